// aer_bus: address-event representation (AER) bus with spike arbitration.
//
// All neurons share one bus that carries the address of one spiking neuron
// per clock cycle. Spike pulses from the neurons are merged with the spikes
// still waiting from earlier cycles; the lowest-numbered waiting neuron is
// sent on the bus in the current cycle (aer_valid/aer_addr, combinational
// from the request vector) and the rest are kept for the following cycles.
// While more than one spike is waiting, halt is raised so that the network
// stops stepping its neurons until every spike of the time step has been
// delivered: n simultaneous spikes therefore cost n-1 halted cycles. The
// one-spike-per-cycle bus and the halt follow the document; the fixed
// lowest-address-first priority is this design's choice.
module aer_bus #(
  parameter int unsigned N      = snn_pkg::N_NEURON,
  parameter int unsigned ADDR_W = $clog2(N)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      spikes,      // one-cycle spike pulses
  output logic              aer_valid,
  output logic [ADDR_W-1:0] aer_addr,
  output logic              halt,        // more than one spike waiting
  output logic [N-1:0]      pending      // spikes waiting for a later cycle
);

  logic [N-1:0] req, grant;

  always_comb begin
    req       = pending | spikes;
    grant     = req & (~req + 1'b1);       // lowest set bit
    aer_valid = |req;
    aer_addr  = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (req[i]) aer_addr = ADDR_W'(i);
    end
    halt = |(req & ~grant);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pending <= '0;
    else        pending <= req & ~grant;
  end

  // A waiting spike is never lost: everything requested is either sent now
  // or kept.
  a_no_loss: assert property (@(posedge clk) disable iff (!rst_n)
    aer_valid |-> ((grant | (req & ~grant)) == req));
  a_onehot_grant: assert property (@(posedge clk) disable iff (!rst_n)
    aer_valid |-> $onehot(grant));

endmodule
