// neuron_ram: synaptic weight memory owned by one neuron.
//
// Every neuron keeps its own RAM with one signed weight per presynaptic
// neuron, indexed by that neuron's AER address. When the AER bus carries the
// address of a neuron that has just spiked, the RAM returns the weight of
// that synapse on the same cycle (asynchronous read, as a distributed RAM)
// and the neuron adds it to its input current. The STDP module writes new
// weights through the write port (we/waddr/wdata), which takes effect at the
// next clock edge. Reset clears every weight to zero, as the document
// requires all input-to-output synapses to start at 0 before training. The
// per-neuron RAM follows the document; the asynchronous read and the
// clearing reset are this design's choices.
module neuron_ram #(
  parameter int unsigned DEPTH  = snn_pkg::N_NEURON,
  parameter int unsigned DATA_W = snn_pkg::WEIGHT_W,
  parameter int unsigned ADDR_W = $clog2(DEPTH)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // write port (from the STDP module)
  input  logic                     we,
  input  logic [ADDR_W-1:0]        waddr,
  input  logic signed [DATA_W-1:0] wdata,
  // read port (AER address)
  input  logic [ADDR_W-1:0]        raddr,
  output logic signed [DATA_W-1:0] rdata
);

  logic signed [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
    end else if (we && (int'(waddr) < int'(DEPTH))) begin
      mem[waddr] <= wdata;
    end
  end

  // Addresses beyond DEPTH read as a zero weight.
  always_comb begin
    rdata = '0;
    if (int'(raddr) < int'(DEPTH)) rdata = mem[raddr];
  end

endmodule
