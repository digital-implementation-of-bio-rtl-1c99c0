// tb_train_sequencer: self-checking testbench for train_sequencer.
//
// Loads nine normal and nine abnormal 35-bit records (generated from a
// hash of class and index), then presents them through image_signal as a
// training run does, alternating normal and abnormal records for two
// passes. Checks that digit shows the selected record, that it is zero with
// no selection, and that each counter advances only when its own control bit
// falls and wraps after the ninth record.
module tb_train_sequencer;
  import snn_pkg::*;

  localparam int unsigned NB = N_INPUT;
  localparam int unsigned NR = 9;

  logic          clk = 1'b0, rst_n = 1'b0, load_we = 1'b0;
  ecg_class_e    load_class = CLASS_NORMAL;
  logic [3:0]    load_idx = '0;
  logic [NB-1:0] load_data = '0, digit;
  logic [1:0]    image_signal = '0;
  logic [3:0]    n_counter, a_counter;
  int            checks = 0, failures = 0;

  train_sequencer dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [NB-1:0] rec(input int cls, input int idx);
    logic [63:0] h;
    h = 64'h9E3779B97F4A7C15 * longint'(cls * 16 + idx + 1);
    return NB'(h ^ (h >> 29));
  endfunction

  task automatic expect_digit(input logic [NB-1:0] e, input string what);
    #1;
    checks++;
    if (digit !== e) begin
      failures++;
      $display("FAIL %s: digit %h expected %h", what, digit, e);
    end
  endtask

  task automatic present(input int cls, input int exp_idx);
    @(negedge clk);
    image_signal = (cls == 0) ? 2'b01 : 2'b10;
    expect_digit(rec(cls, exp_idx), cls == 0 ? "normal" : "abnormal");
    repeat (4) @(posedge clk);
    expect_digit(rec(cls, exp_idx), "held");
    @(negedge clk);
    image_signal = 2'b00;
    expect_digit('0, "no selection");
    @(posedge clk); #1;
  endtask

  int ni, ai;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < int'(NR); i++) begin
        @(negedge clk);
        load_we = 1'b1; load_class = ecg_class_e'(c);
        load_idx = 4'(i); load_data = rec(c, i);
      end
    @(negedge clk);
    load_we = 1'b0;
    expect_digit('0, "idle");

    ni = 0; ai = 0;
    for (int t = 0; t < 2 * int'(NR); t++) begin
      present(0, ni);
      ni = (ni + 1) % NR;
      checks++;
      if (int'(n_counter) != ni || int'(a_counter) != ai) begin
        failures++;
        $display("FAIL counters after normal: %0d %0d expected %0d %0d",
                 n_counter, a_counter, ni, ai);
      end
      present(1, ai);
      ai = (ai + 1) % NR;
      checks++;
      if (int'(n_counter) != ni || int'(a_counter) != ai) begin
        failures++;
        $display("FAIL counters after abnormal: %0d %0d expected %0d %0d",
                 n_counter, a_counter, ni, ai);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
