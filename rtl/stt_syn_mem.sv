// stt_syn_mem: synaptic memory of the core (binary STT-RAM array).
//
// WL word lines of WIDTH bits. One word line holds one b-bit synapse for
// every output neuron (WIDTH = N_OUT * B; neuron i in bits [i*B +: B]).
// Lines 0 .. N_IN*TAU-1 hold the stimulus kernels (TAU lines per input
// neuron), the next line holds the biases gamma, and the remaining lines are
// spare (the document reserves some for fan-out destination addresses). Each
// bit is one binary STT-RAM cell; the cell, its drivers and sense amplifiers
// are analog and are represented here only by their logic function, a
// synchronous array with one read and one write port. The physical banking
// into subarrays does not change that function and is not modelled.
//
// Timing: a read issued with rd_en in cycle n presents rd_data after the
// clock edge that ends cycle n (READ_LAT = 1). A write with we stores wdata
// at waddr on the clock edge. A read and a write of the same line in the
// same cycle return the old contents. The array is not reset; it must be
// programmed before inference.
module stt_syn_mem #(
  parameter int unsigned WL    = spinaps_pkg::WL_D,
  parameter int unsigned WIDTH = spinaps_pkg::N_OUT_D * spinaps_pkg::B_D,
  localparam int unsigned AW   = $clog2(WL)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);

  logic [WIDTH-1:0] mem [WL];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
