// izh_neuron: digital Izhikevich neuron with its own synaptic weight RAM.
//
// Each enabled clock cycle (en = 1) is one forward-Euler integration step
// of the Izhikevich model, with a time step dt = 2^-DT_SHIFT ms (0.25 ms by
// default):
//   v' = 0.04 v^2 + 5 v + 140 - u + I
//   u' = a (b v - u)
//   if v >= 30 mV then v <- c, u <- u + d, and the neuron spikes.
// v and u are signed Q15.8 numbers in mV; the constants 0.04, a and b are
// Q0.16 multipliers. The input current I of a step is the sum of the
// weights of all AER events received since the previous step plus an
// external bias i_ext (used to stimulate input and training neurons). The
// "Input Align" stage clamps that sum to no less than -140 so that a strongly
// negative input cannot drive the neuron into spurious spikes. The step is
// kept below 1 ms because the quadratic term makes a 1 ms Euler step
// unstable for such inputs: from v = -65 an input of -140 would throw v to
// about -208 mV and the next step would overshoot into a false spike; with
// 0.25 ms steps v settles at about -122 mV and recovers without firing.
//
// Interface: en is the neuron activation (the network holds it low while the
// AER bus is halted); we/waddr/wdata write the weight RAM; aer_valid/aer_addr
// is the AER bus, naming the neuron that spiked; spike_out is a one-cycle
// pulse registered on the clock edge that ends the step in which v reached
// the peak. An AER event arriving in the same cycle as a step counts toward
// the next step. The equations, the typical parameter values (a = 0.02,
// b = 0.2, c = -65 mV, d = 8) and the -140 clamp follow the document; the
// fixed-point formats, the Euler step size and the event timing are this
// design's choices.
module izh_neuron
  import snn_pkg::*;
#(
  parameter int unsigned DEPTH    = N_NEURON,  // synapses (presynaptic addresses)
  parameter int          A_Q16    = 1311,      // a = 0.02
  parameter int          B_Q16    = 13107,     // b = 0.2
  parameter int          K_SQ_Q16 = 2621,      // 0.04
  parameter int          C_MV     = -65,       // reset potential c
  parameter int          D_MV     = 8,         // recovery jump d
  parameter int          V_PEAK   = 30,        // spike threshold (mV)
  parameter int          I_MIN    = -140,      // Input Align lower limit
  parameter int unsigned DT_SHIFT = 2          // step = 2^-DT_SHIFT ms
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      en,
  // weight RAM write port
  input  logic      we,
  input  addr_t     waddr,
  input  weight_t   wdata,
  // AER bus
  input  logic      aer_valid,
  input  addr_t     aer_addr,
  // external bias current (integer, same unit as a weight)
  input  current_t  i_ext,
  output logic      spike_out,
  output state_t    v_out,
  output state_t    u_out
);

  typedef logic signed [63:0] wide_t;

  localparam longint ONE     = longint'(1) << FRAC;
  localparam longint ST_MAX  = (longint'(1) << (STATE_W - 1)) - 1;
  localparam longint ST_MIN  = -(longint'(1) << (STATE_W - 1));
  localparam longint CUR_MAX = (longint'(1) << (CUR_W - 1)) - 1;
  localparam longint CUR_MIN = -(longint'(1) << (CUR_W - 1));

  // ---------------------------------------------------------------- weights
  weight_t w_rd;

  neuron_ram #(.DEPTH(DEPTH), .DATA_W(WEIGHT_W), .ADDR_W(ADDR_W)) u_ram (
    .clk   (clk),
    .rst_n (rst_n),
    .we    (we),
    .waddr (waddr),
    .wdata (wdata),
    .raddr (aer_addr),
    .rdata (w_rd)
  );

  // ---------------------------------------------------------------- state
  state_t   v_q, u_q;
  current_t i_acc;

  // ---------------------------------------------------------------- input align
  wide_t i_sum, i_aligned, acc_sum, w_cur;
  always_comb begin
    w_cur     = wide_t'(w_rd) <<< DT_SHIFT;     // event charge spread over 1 ms
    i_sum     = wide_t'(i_acc) + wide_t'(i_ext);
    i_aligned = i_sum;
    if (i_aligned < longint'(I_MIN)) i_aligned = longint'(I_MIN);
    if (i_aligned > CUR_MAX)         i_aligned = CUR_MAX;
    acc_sum = wide_t'(i_acc) + w_cur;
    if (acc_sum > CUR_MAX) acc_sum = CUR_MAX;
    if (acc_sum < CUR_MIN) acc_sum = CUR_MIN;
  end

  // ---------------------------------------------------------------- dynamics
  wide_t v_l, u_l, v_sq, t_sq, dv, v_nx, bv, du, u_nx, u_rs;
  logic   fire;
  always_comb begin
    v_l  = wide_t'(v_q);
    u_l  = wide_t'(u_q);
    v_sq = v_l * v_l;                               // Q.16
    t_sq = (v_sq * longint'(K_SQ_Q16)) >>> (16 + FRAC); // Q.8
    dv   = t_sq + 5 * v_l + 140 * ONE - u_l + i_aligned * ONE;
    v_nx = v_l + (dv >>> DT_SHIFT);
    if (v_nx > ST_MAX) v_nx = ST_MAX;
    if (v_nx < ST_MIN) v_nx = ST_MIN;
    bv   = (v_l * longint'(B_Q16)) >>> 16;
    du   = ((bv - u_l) * longint'(A_Q16)) >>> (16 + DT_SHIFT);
    u_nx = u_l + du;
    u_rs = u_nx + longint'(D_MV) * ONE;
    if (u_rs > ST_MAX) u_rs = ST_MAX;
    fire = (v_nx >= longint'(V_PEAK) * ONE);
  end

  localparam state_t V_RESET = state_t'(longint'(C_MV) * ONE);
  localparam state_t U_RESET = state_t'((longint'(C_MV) * ONE * longint'(B_Q16)) >>> 16);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= V_RESET;
      u_q       <= U_RESET;
      i_acc     <= '0;
      spike_out <= 1'b0;
    end else if (en) begin
      if (fire) begin
        v_q <= V_RESET;
        u_q <= state_t'(u_rs);
      end else begin
        v_q <= state_t'(v_nx);
        u_q <= state_t'(u_nx);
      end
      spike_out <= fire;
      i_acc     <= aer_valid ? current_t'(w_cur) : '0;
    end else begin
      spike_out <= 1'b0;
      if (aer_valid) i_acc <= current_t'(acc_sum);
    end
  end

  assign v_out = v_q;
  assign u_out = u_q;

endmodule
