// tb_aer_bus: self-checking testbench for aer_bus.
//
// Drives spike patterns (single spikes, several at once, bursts arriving
// while earlier spikes still wait) and checks every cycle against a queue
// model: the bus carries the lowest waiting address, halt is high exactly
// when more than one spike waits, no spike is lost or sent twice, and n
// simultaneous spikes take exactly n cycles to deliver with n-1 halted
// cycles.
module tb_aer_bus;
  import snn_pkg::*;

  localparam int unsigned N = N_NEURON;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [N-1:0]  spikes = '0, pending;
  logic          aer_valid, halt;
  addr_t         aer_addr;
  int            checks = 0, failures = 0;
  logic [N-1:0]  mpend = '0;
  int            sent [N];
  int            fired [N];

  aer_bus dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drive a spike vector for one cycle and check the outputs of that cycle
  task automatic cycle(input logic [N-1:0] s);
    logic [N-1:0] req;
    int exp_addr, cnt;
    spikes = s;
    for (int i = 0; i < int'(N); i++) if (s[i]) fired[i]++;
    #1;
    req = mpend | s;
    exp_addr = -1; cnt = 0;
    for (int i = 0; i < int'(N); i++) if (req[i]) begin
      if (exp_addr < 0) exp_addr = i;
      cnt++;
    end
    checks++;
    if (aer_valid != (cnt > 0) || halt != (cnt > 1) ||
        (cnt > 0 && int'(aer_addr) != exp_addr)) begin
      failures++;
      $display("FAIL valid=%0b halt=%0b addr=%0d expected %0d cnt %0d",
               aer_valid, halt, aer_addr, exp_addr, cnt);
    end
    if (aer_valid) sent[aer_addr]++;
    if (exp_addr >= 0) req[exp_addr] = 1'b0;
    mpend = req;
    @(posedge clk); #1;
    spikes = '0;
  endtask

  int ncyc, nhalt;

  initial begin
    for (int i = 0; i < int'(N); i++) begin sent[i] = 0; fired[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;

    cycle('0);
    cycle(N'(1) << 7);                 // single spike: no halt
    cycle('0);

    // five simultaneous spikes: 5 cycles, 4 halted
    ncyc = 0; nhalt = 0;
    spikes = '0;
    cycle((N'(1) << 2) | (N'(1) << 9) | (N'(1) << 20) | (N'(1) << 35) | (N'(1) << 38));
    ncyc = 1; nhalt = 1;
    while (mpend != '0) begin
      #1;
      if (halt) nhalt++;
      cycle('0);
      ncyc++;
    end
    checks++;
    if (ncyc != 5 || nhalt != 4) begin
      failures++;
      $display("FAIL burst took %0d cycles with %0d halted", ncyc, nhalt);
    end

    // random traffic; spikes of a neuron only arrive when it is not waiting
    for (int t = 0; t < 3000; t++) begin
      logic [N-1:0] s;
      s = '0;
      for (int i = 0; i < int'(N); i++)
        if ($urandom_range(0, 19) == 0 && !mpend[i]) s[i] = 1'b1;
      cycle(s);
    end
    while (mpend != '0) cycle('0);

    for (int i = 0; i < int'(N); i++) begin
      checks++;
      if (sent[i] != fired[i]) begin
        failures++;
        $display("FAIL neuron %0d fired %0d sent %0d", i, fired[i], sent[i]);
      end
    end
    checks++;
    if (pending != '0) begin failures++; $display("FAIL queue not empty"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
