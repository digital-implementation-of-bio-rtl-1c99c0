// tb_neuron_ram: self-checking testbench for neuron_ram.
//
// Checks that every weight reads 0 after reset, that writes land at their
// address only and are visible from the next cycle, that the read is
// asynchronous (changes with raddr in the same cycle), and a run of random
// writes and reads against a scoreboard array.
module tb_neuron_ram;
  import snn_pkg::*;

  localparam int unsigned DEPTH = N_NEURON;

  logic    clk = 1'b0, rst_n = 1'b0, we = 1'b0;
  addr_t   waddr = '0, raddr = '0;
  weight_t wdata = '0, rdata;
  int      checks = 0, failures = 0;
  int      ref_mem [DEPTH];

  neuron_ram dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all(input string what);
    for (int a = 0; a < int'(DEPTH); a++) begin
      raddr = addr_t'(a);
      #1;
      checks++;
      if (int'(rdata) != ref_mem[a]) begin
        failures++;
        $display("FAIL %s addr %0d: got %0d expected %0d", what, a, rdata, ref_mem[a]);
      end
    end
  endtask

  initial begin
    for (int a = 0; a < int'(DEPTH); a++) ref_mem[a] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check_all("after reset");

    // directed writes
    @(negedge clk);
    we = 1'b1; waddr = 6'd5; wdata = 8'sd17;
    raddr = 6'd5;
    #1;
    checks++;
    if (rdata != 0) begin failures++; $display("FAIL write visible before clock"); end
    @(posedge clk); #1;
    we = 1'b0;
    ref_mem[5] = 17;
    checks++;
    if (rdata != 8'sd17) begin failures++; $display("FAIL write not visible"); end
    we = 1'b1; waddr = 6'd38; wdata = -8'sd128;
    @(posedge clk); #1;
    we = 1'b0;
    ref_mem[38] = -128;
    check_all("directed");

    // random
    for (int t = 0; t < 500; t++) begin
      int a, w;
      a = $urandom_range(0, DEPTH - 1);
      w = $urandom_range(0, 255) - 128;
      we = 1'b1; waddr = addr_t'(a); wdata = weight_t'(w);
      @(posedge clk); #1;
      we = 1'b0;
      ref_mem[a] = w;
      raddr = addr_t'($urandom_range(0, DEPTH - 1));
      #1;
      checks++;
      if (int'(rdata) != ref_mem[raddr]) begin
        failures++;
        $display("FAIL random read addr %0d", raddr);
      end
    end
    check_all("random");

    // reset clears everything
    rst_n = 1'b0; #1 rst_n = 1'b1;
    for (int a = 0; a < int'(DEPTH); a++) ref_mem[a] = 0;
    check_all("second reset");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
