// tb_stdp: self-checking testbench for the STDP module.
//
// Directed cases: a presynaptic spike followed by a postsynaptic spike
// raises that synapse's weight from 0 to 1; a postsynaptic spike followed by
// a presynaptic spike lowers it from 0 to -2; spike pairs further apart than
// the gate window and pairs with learning disabled change nothing; the write
// reaches the RAM port within the scan latency. A random phase then applies
// many well separated spike pairs to random synapses, with random orders and
// gaps, and compares every written weight with a model that applies +1 or
// -2 with saturation at the 8-bit range.
module tb_stdp;
  import snn_pkg::*;

  localparam int unsigned NP = N_INPUT;
  localparam int unsigned W  = 32;   // the module's default gate window

  logic          clk = 1'b0, rst_n = 1'b0, en = 1'b0, en_addr = 1'b0;
  logic [NP-1:0] pre_spikes = '0;
  logic          post_spike = 1'b0;
  logic          we, inc_evt, dec_evt;
  addr_t         addr;
  weight_t       weight;
  int            checks = 0, failures = 0;

  int model_w [NP];
  int ram_w   [NP];
  int nwrites = 0, last_write_cycle = 0, cyc = 0;

  stdp dut (.*);

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (we) begin
      ram_w[addr] <= int'(weight);
      nwrites <= nwrites + 1;
      last_write_cycle <= cyc;
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic pulse_pre(input int i);
    pre_spikes = NP'(1) << i;
    @(posedge clk); #1;
    pre_spikes = '0;
  endtask

  task automatic pulse_post();
    post_spike = 1'b1;
    @(posedge clk); #1;
    post_spike = 1'b0;
  endtask

  task automatic check_weights(input string what);
    for (int i = 0; i < int'(NP); i++) begin
      checks++;
      if (ram_w[i] != model_w[i]) begin
        failures++;
        $display("FAIL %s synapse %0d: %0d expected %0d", what, i, ram_w[i], model_w[i]);
      end
    end
  endtask

  function automatic int sat(input int x);
    if (x > 127) return 127;
    if (x < -128) return -128;
    return x;
  endfunction

  int c0, nw0;

  initial begin
    for (int i = 0; i < int'(NP); i++) begin model_w[i] = 0; ram_w[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    en = 1'b1; en_addr = 1'b1;
    idle(2);

    // pre then post (130 cycles apart is outside; 13 cycles is inside)
    pulse_pre(0);
    idle(12);
    nw0 = nwrites;
    c0 = cyc;
    pulse_post();
    idle(NP + 6);
    model_w[0] = 1;
    check_weights("pre-before-post");
    checks++;
    if (nwrites != nw0 + 1 || last_write_cycle - c0 > int'(NP) + 4) begin
      failures++;
      $display("FAIL expected one write within %0d cycles, got %0d writes, %0d cycles",
               NP + 4, nwrites - nw0, last_write_cycle - c0);
    end
    idle(2 * W);

    // post then pre
    pulse_post();
    idle(20);
    pulse_pre(1);
    idle(NP + 6);
    model_w[1] = -2;
    check_weights("post-before-pre");
    idle(2 * W);

    // outside the window: no change
    nw0 = nwrites;
    pulse_pre(2);
    idle(W + 5);
    pulse_post();
    idle(W + 5);
    pulse_pre(3);
    idle(NP + 6);
    checks++;
    if (nwrites != nw0) begin failures++; $display("FAIL write outside window"); end
    check_weights("outside window");
    idle(2 * W);

    // learning disabled: no change
    en = 1'b0;
    pulse_pre(4);
    idle(3);
    pulse_post();
    idle(3);
    pulse_pre(5);
    idle(NP + 6);
    en = 1'b1;
    check_weights("disabled");
    idle(2 * W);

    // random well separated pairs, some on several synapses at once
    for (int t = 0; t < 600; t++) begin
      logic [NP-1:0] set;
      int gap;
      bit pre_first;
      set = '0;
      for (int k = 0; k < 3; k++) set[$urandom_range(0, NP - 1)] = 1'b1;
      gap = ($urandom_range(0, 1) == 0) ? $urandom_range(1, W - 2)
                                         : $urandom_range(W + 2, 2 * W);
      pre_first = ($urandom_range(0, 1) == 1);
      if (pre_first) begin
        pre_spikes = set; @(posedge clk); #1; pre_spikes = '0;
        if (gap > 1) idle(gap - 1);
        pulse_post();
      end else begin
        pulse_post();
        if (gap > 1) idle(gap - 1);
        pre_spikes = set; @(posedge clk); #1; pre_spikes = '0;
      end
      if (gap <= int'(W))
        for (int i = 0; i < int'(NP); i++)
          if (set[i]) model_w[i] = sat(model_w[i] + (pre_first ? 1 : -2));
      idle(2 * W + 4 * int'(NP));
    end
    check_weights("random");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
