// som_vq_top: vector quantizer built around a self-organizing map (SOM).
//
// An image is cut into blocks, each block is a D-dimensional vector, and the
// vector is replaced by the index of the nearest code vector (neuron weight
// vector) of a codebook of N entries. The same arithmetic serves two modes:
//   encoding: D squared difference units (SDUs) compute (x_i - w_ij)^2, the
//     reconfigurable adder tree sums them into the squared Euclidean distance
//     (SED) and the minimum distance search circuit keeps the smallest SED
//     and its index while all N neurons stream past, one partial vector per
//     clock cycle;
//   learning: after the search the SDUs compute alpha*(x_i - w_ij), the adder
//     tree's adders compute w_ij + alpha*(x_i - w_ij), and the winner's
//     weights are written back to the codebook memory.
// A third mode reads back the code vector of an index (decoding).
//
// Pipeline, per partial vector: controller issues the read (cycle 0), the
// codebook word and the matching partial input vector meet at the SDUs
// (cycle 1), the SDU register feeds the adder tree (cycle 2), the tree's
// register feeds the search circuit (cycle 3).
//
// Interface: a command (start, mode, dec_idx) is taken while start_ready is
// 1. In encoding and learning modes NPART partial input vectors follow on
// x_data with a valid/ready handshake. idx_valid pulses with the winner's
// index and its SED. Decoded partial vectors appear on dec_data with
// dec_valid. The codebook is loaded through cb_we/cb_addr/cb_wdata while the
// quantizer is idle. alpha is the learning rate, an unsigned fraction with
// DW fractional bits, held steady while learning.
// The blocks and the two modes follow the design; the interfaces, the
// decoding mode and the load port are this implementation's choices.
module som_vq_top
  import vq_pkg::*;
#(
  parameter int unsigned DW    = VQ_DW,
  parameter int unsigned D     = VQ_D,
  parameter int unsigned N     = VQ_N,
  parameter int unsigned NPART = VQ_NPART,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned MAW   = (N * NPART > 1) ? $clog2(N * NPART) : 1,
  parameter int unsigned SW    = sed_width(DW, D, NPART)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 start,
  input  vq_mode_e             mode,
  input  logic [IW-1:0]        dec_idx,
  output logic                 start_ready,
  output logic                 busy,
  input  logic [DW-1:0]        alpha,
  // input vector
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [D-1:0][DW-1:0] x_data,
  // codebook load port
  input  logic                 cb_we,
  input  logic [MAW-1:0]       cb_addr,
  input  logic [D-1:0][DW-1:0] cb_wdata,
  // results
  output logic                 idx_valid,
  output logic [IW-1:0]        idx,
  output logic [SW-1:0]        win_dist,
  output logic                 dec_valid,
  output logic [D-1:0][DW-1:0] dec_data
);

  // Controller <-> memory
  logic                 rd_en, c_we;
  logic [MAW-1:0]       rd_addr, c_waddr;
  logic [D-1:0][DW-1:0] rd_data, c_wdata;
  // Datapath controls
  logic                 dp_valid, dp_s1, dp_sep, mdsc_clear;
  logic [IW-1:0]        dp_tag;
  logic [D-1:0][DW-1:0] dp_x;
  // SDU outputs
  logic signed [D-1:0][2*DW+1:0] term;
  logic [D-1:0][DW-1:0] w_q;
  logic [D-1:0]         s1_q;
  logic                 t_valid, t_sep;
  // Tree and search outputs
  logic                 sed_valid, upd_valid, win_valid;
  logic [SW-1:0]        sed;
  logic [D-1:0][DW-1:0] upd_w;
  logic [IW-1:0]        win_idx;

  vq_ctrl #(.DW(DW), .D(D), .N(N), .NPART(NPART), .IW(IW), .MAW(MAW)) u_ctrl (
    .clk, .rst_n,
    .start, .mode, .dec_idx, .start_ready, .busy,
    .x_valid, .x_ready, .x_data,
    .rd_en, .rd_addr, .wr_en(c_we), .wr_addr(c_waddr), .wr_data(c_wdata),
    .dp_valid, .dp_s1, .dp_sep, .dp_tag, .dp_x, .dec_valid,
    .mdsc_clear, .win_valid, .win_idx, .upd_valid, .upd_w,
    .idx_valid, .idx
  );

  // The controller owns the write port while busy; the load port otherwise.
  logic                 m_we;
  logic [MAW-1:0]       m_waddr;
  logic [D-1:0][DW-1:0] m_wdata;
  always_comb begin
    if (busy) begin
      m_we    = c_we;
      m_waddr = c_waddr;
      m_wdata = c_wdata;
    end else begin
      m_we    = cb_we;
      m_waddr = cb_addr;
      m_wdata = cb_wdata;
    end
  end

  codebook_mem #(.DW(DW), .D(D), .DEPTH(N * NPART), .AW(MAW)) u_mem (
    .clk, .rd_en, .rd_addr, .rd_data,
    .we(m_we), .wr_addr(m_waddr), .wr_data(m_wdata)
  );

  assign dec_data = rd_data;

  for (genvar k = 0; k < D; k++) begin : g_sdu
    sdu #(.DW(DW)) u_sdu (
      .clk, .rst_n, .en(dp_valid), .s1(dp_s1),
      .x(dp_x[k]), .w(rd_data[k]), .alpha,
      .term(term[k]), .w_q(w_q[k]), .s1_q(s1_q[k])
    );
  end

  // Valid and S_SEP travel beside the SDU register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t_valid <= 1'b0;
      t_sep   <= 1'b0;
    end else begin
      t_valid <= dp_valid;
      t_sep   <= dp_sep;
    end
  end

  rcbat #(.DW(DW), .D(D), .NPART(NPART), .SW(SW)) u_tree (
    .clk, .rst_n, .in_valid(t_valid), .learn(s1_q[0]), .sep(t_sep),
    .term, .w(w_q),
    .sed_valid, .sed, .upd_valid, .upd_w
  );

  mdsc #(.SW(SW), .N(N), .IW(IW), .LAT(2)) u_mdsc (
    .clk, .rst_n, .clear(mdsc_clear), .tag_in(dp_tag),
    .sed_valid, .sed,
    .win_valid, .win_idx, .win_dist
  );

endmodule
