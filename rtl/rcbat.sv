// rcbat: reconfigurable complete binary adder tree.
//
// D lanes enter from the squared difference units. The tree holds D-1
// two-input adders arranged as a complete binary tree plus one accumulating
// adder at its root, D adders in all. Each adder has a multiplexer on both
// inputs, so the same adders serve both modes:
//   learn = 0 (encoding / winner search): the tree sums the D squared
//     differences into a partial squared Euclidean distance (SED) and the
//     root adder adds it to the running partial sum. While S_SEP (sep) is 0
//     partial vectors keep accumulating; the beat with sep = 1 is the last
//     partial vector and produces the exact SED on sed with sed_valid.
//   learn = 1 (codebook learning): every adder is cut loose from the tree
//     and computes one lane's updated weight, w + alpha*(x - w), from the
//     weight and the alpha-scaled difference produced by the SDUs. The
//     D-1 tree adders serve lanes 0..D-2 level by level, the root adder
//     lane D-1.
// The tree, the S_SEP separation and the reuse of the adders for learning
// follow the design; the lane-to-adder mapping, the register placement and
// the widths are this implementation's choices. D must be a power of two.
//
// Timing: one register stage. A beat with in_valid = 1 gives sed_valid (if
// learn = 0 and sep = 1) or upd_valid (if learn = 1) one cycle later.
module rcbat #(
  parameter int unsigned DW    = vq_pkg::VQ_DW,
  parameter int unsigned D     = vq_pkg::VQ_D,
  parameter int unsigned NPART = vq_pkg::VQ_NPART,
  parameter int unsigned SW    = vq_pkg::sed_width(DW, D, NPART)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic                        learn,   // s1: 1 = weight update
  input  logic                        sep,     // S_SEP: last partial vector
  input  logic signed [D-1:0][2*DW+1:0] term,  // SDU outputs
  input  logic        [D-1:0][DW-1:0] w,       // weights, aligned with term
  output logic                        sed_valid,
  output logic        [SW-1:0]        sed,     // exact SED
  output logic                        upd_valid,
  output logic        [D-1:0][DW-1:0] upd_w    // updated weights
);

  localparam int unsigned LEVELS = $clog2(D);
  localparam int unsigned AW     = SW + 1;   // signed adder width
  typedef logic signed [AW-1:0] acc_t;

  // Operand of lane k in learning mode: weight and alpha*(x-w).
  acc_t lane_w   [D];
  acc_t lane_dlt [D];
  always_comb begin
    for (int k = 0; k < D; k++) begin
      lane_w[k]   = acc_t'({1'b0, w[k]});
      lane_dlt[k] = acc_t'(term[k]);
    end
  end

  // Tree levels; level l has D >> (l+1) adders and serves learning lanes
  // starting at D - (D >> l).
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned NA  = D >> (l + 1);
    localparam int unsigned OFS = D - (D >> l);
    acc_t s [NA];
    for (genvar p = 0; p < NA; p++) begin : g_add
      acc_t a, b;
      if (l == 0) begin : g_leaf
        assign a = learn ? lane_w[OFS+p]   : acc_t'(term[2*p]);
        assign b = learn ? lane_dlt[OFS+p] : acc_t'(term[2*p+1]);
      end else begin : g_inner
        assign a = learn ? lane_w[OFS+p]   : g_lvl[l-1].s[2*p];
        assign b = learn ? lane_dlt[OFS+p] : g_lvl[l-1].s[2*p+1];
      end
      assign s[p] = a + b;
    end
  end

  // Root adder: accumulates partial SEDs, or updates lane D-1.
  acc_t acc_q, root_a, root_b, root_s;
  assign root_a = learn ? lane_w[D-1]   : g_lvl[LEVELS-1].s[0];
  assign root_b = learn ? lane_dlt[D-1] : acc_q;
  assign root_s = root_a + root_b;

  // Adder outputs gathered per lane for the learning write-back.
  logic [D-1:0][DW-1:0] lane_res;
  for (genvar l = 0; l < LEVELS; l++) begin : g_res
    for (genvar p = 0; p < (D >> (l + 1)); p++) begin : g_p
      assign lane_res[D - (D >> l) + p] = g_lvl[l].s[p][DW-1:0];
    end
  end
  assign lane_res[D-1] = root_s[DW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_q     <= '0;
      sed       <= '0;
      sed_valid <= 1'b0;
      upd_w     <= '0;
      upd_valid <= 1'b0;
    end else begin
      sed_valid <= 1'b0;
      upd_valid <= 1'b0;
      if (in_valid && !learn) begin
        if (sep) begin
          sed       <= root_s[SW-1:0];
          sed_valid <= 1'b1;
          acc_q     <= '0;
        end else begin
          acc_q     <= root_s;
        end
      end
      if (in_valid && learn) begin
        upd_w     <= lane_res;
        upd_valid <= 1'b1;
      end
    end
  end

endmodule
