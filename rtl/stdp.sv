// stdp: spike-timing-dependent plasticity module for one postsynaptic neuron.
//
// The module watches the spikes of N_PRE presynaptic neurons (pre_spikes)
// and of the postsynaptic training neuron (post_spike) and writes the
// resulting weights into the weight RAM of the output neuron it trains
// (we/addr/weight). It is built from the three parts the document names:
//  * I/D Sel - per synapse, a pre_gate stays open for WINDOW cycles after a
//    presynaptic spike and a post_gate for WINDOW cycles after a
//    postsynaptic spike. A post spike while the synapse's pre_gate is open
//    (pre before post) requests an increase; a pre spike while the post_gate
//    is open (post before pre) requests a decrease. Each gate is consumed by
//    the decision it causes, so one spike pair changes a weight once.
//  * Weight cnt - an up/down counter loaded with the synapse's present
//    weight. An increment pulse of LTP_STEP cycles or a decrement pulse of
//    LTD_STEP cycles moves it by one per cycle, saturating at the weight
//    range; the length of the pulse sets the size of the change (+1 and -2
//    by default, the changes the document shows for the two orders).
//  * Addr cnt - scans the synapses one per cycle while en_addr is high; at
//    a synapse with a pending request it runs the weight counter and then
//    raises we for one cycle with addr = ADDR_BASE + synapse index.
// The module keeps a copy of the weights it has written, since the neuron
// RAM has no read port towards it; reset clears them to 0 like the RAM.
// en enables learning (gates and requests); en_addr enables write-back.
// Latency from a request to its write: up to N_PRE scan cycles plus
// LTD_STEP + 2 cycles (detect, pulse, write) per request ahead of it.
// The gate windows, the one-decision-per-gate rule and the scanning order
// are this design's choices.
module stdp
  import snn_pkg::*;
#(
  parameter int unsigned N_PRE     = N_INPUT,
  parameter int unsigned ADDR_BASE = 0,
  parameter int unsigned WINDOW    = 32,   // gate length in cycles
  parameter int unsigned LTP_STEP  = 1,    // increment pulse length
  parameter int unsigned LTD_STEP  = 2     // decrement pulse length
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             en_addr,
  input  logic [N_PRE-1:0] pre_spikes,
  input  logic             post_spike,
  output logic             we,
  output addr_t            addr,
  output weight_t          weight,
  output logic             inc_evt,    // an increase was decided this cycle
  output logic             dec_evt     // a decrease was decided this cycle
);

  localparam int unsigned TW    = $clog2(WINDOW + 1);
  localparam int unsigned SW    = $clog2((LTP_STEP > LTD_STEP ? LTP_STEP : LTD_STEP) + 1);
  localparam int unsigned IW    = (N_PRE > 1) ? $clog2(N_PRE) : 1;

  typedef enum logic [1:0] {S_SCAN, S_PULSE, S_WRITE} state_e;

  logic [TW-1:0]    pre_timer [N_PRE];
  logic [TW-1:0]    post_timer;
  logic [N_PRE-1:0] arm;
  logic [N_PRE-1:0] pend_inc, pend_dec, set_inc, set_dec, clr_inc, clr_dec;
  weight_t          shadow [N_PRE];

  state_e           state;
  logic [IW-1:0]    addr_cnt;
  weight_t          wcnt;
  logic             dir_up;
  logic [SW-1:0]    pulse_cnt;

  // ---------------------------------------------------------------- I/D Sel
  logic post_gate;
  always_comb begin
    post_gate = (post_timer != '0);
    for (int i = 0; i < int'(N_PRE); i++) begin
      set_inc[i] = en && post_spike && !pre_spikes[i] && (pre_timer[i] != '0);
      set_dec[i] = en && pre_spikes[i] && !post_spike && post_gate && arm[i];
    end
    inc_evt = |set_inc;
    dec_evt = |set_dec;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(N_PRE); i++) pre_timer[i] <= '0;
      post_timer <= '0;
      arm        <= '0;
    end else if (!en) begin
      for (int i = 0; i < int'(N_PRE); i++) pre_timer[i] <= '0;
      post_timer <= '0;
      arm        <= '0;
    end else begin
      post_timer <= post_spike ? TW'(WINDOW) :
                    (post_gate ? post_timer - 1'b1 : post_timer);
      for (int i = 0; i < int'(N_PRE); i++) begin
        if (pre_spikes[i])            pre_timer[i] <= TW'(WINDOW);
        else if (set_inc[i])          pre_timer[i] <= '0;
        else if (pre_timer[i] != '0)  pre_timer[i] <= pre_timer[i] - 1'b1;
        if (post_spike)               arm[i] <= 1'b1;
        else if (set_dec[i])          arm[i] <= 1'b0;
      end
    end
  end

  // ---------------------------------------------------------------- requests
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_inc <= '0;
      pend_dec <= '0;
    end else begin
      pend_inc <= (pend_inc & ~clr_inc) | set_inc;
      pend_dec <= (pend_dec & ~clr_dec) | set_dec;
    end
  end

  // ---------------------------------------------------------------- Addr cnt / Weight cnt
  always_comb begin
    clr_inc = '0;
    clr_dec = '0;
    if (state == S_WRITE) begin
      if (dir_up) clr_inc[addr_cnt] = 1'b1;
      else        clr_dec[addr_cnt] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_SCAN;
      addr_cnt  <= '0;
      wcnt      <= '0;
      dir_up    <= 1'b0;
      pulse_cnt <= '0;
      for (int i = 0; i < int'(N_PRE); i++) shadow[i] <= '0;
    end else begin
      unique case (state)
        S_SCAN: if (en_addr) begin
          if (pend_inc[addr_cnt] || pend_dec[addr_cnt]) begin
            wcnt      <= shadow[addr_cnt];
            dir_up    <= pend_inc[addr_cnt];
            pulse_cnt <= pend_inc[addr_cnt] ? SW'(LTP_STEP) : SW'(LTD_STEP);
            state     <= S_PULSE;
          end else begin
            addr_cnt <= (int'(addr_cnt) == int'(N_PRE) - 1) ? '0 : addr_cnt + 1'b1;
          end
        end
        S_PULSE: begin
          if (dir_up && wcnt != W_MAX)       wcnt <= wcnt + 1'b1;
          else if (!dir_up && wcnt != W_MIN) wcnt <= wcnt - 1'b1;
          pulse_cnt <= pulse_cnt - 1'b1;
          if (pulse_cnt <= SW'(1)) state <= S_WRITE;
        end
        S_WRITE: begin
          shadow[addr_cnt] <= wcnt;
          addr_cnt <= (int'(addr_cnt) == int'(N_PRE) - 1) ? '0 : addr_cnt + 1'b1;
          state    <= S_SCAN;
        end
        default: state <= S_SCAN;
      endcase
    end
  end

  assign we     = (state == S_WRITE);
  assign addr   = addr_t'(ADDR_BASE + int'(addr_cnt));
  assign weight = wcnt;

  a_we_in_range: assert property (@(posedge clk) disable iff (!rst_n)
    we |-> (int'(addr_cnt) < int'(N_PRE)));

endmodule
