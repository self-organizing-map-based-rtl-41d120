// codebook_mem: codebook memory holding the weight vectors of all neurons.
//
// One word is one partial weight vector: D components of DW bits. Neuron n
// occupies the NPART consecutive words starting at its start address
// n * NPART, so the winner's partial vectors are read out in sequence from
// its start address. The memory has one synchronous read port and one write
// port; a read of the address being written returns the old contents.
// The design names the memory and its read port; port set, synchronous read
// and the absence of a reset (contents are loaded through the write port)
// are this implementation's choices.
//
// Timing: rd_data is valid in the cycle after rd_en; writes take effect at
// the clock edge with we = 1.
module codebook_mem #(
  parameter int unsigned DW    = vq_pkg::VQ_DW,
  parameter int unsigned D     = vq_pkg::VQ_D,
  parameter int unsigned DEPTH = vq_pkg::VQ_N * vq_pkg::VQ_NPART,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic                 clk,
  input  logic                 rd_en,
  input  logic [AW-1:0]        rd_addr,
  output logic [D-1:0][DW-1:0] rd_data,
  input  logic                 we,
  input  logic [AW-1:0]        wr_addr,
  input  logic [D-1:0][DW-1:0] wr_data
);

  logic [D-1:0][DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
