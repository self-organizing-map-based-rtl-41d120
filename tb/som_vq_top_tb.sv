// som_vq_top_tb: end-to-end test of the vector quantizer at reduced size
// (N = 8 code vectors of NPART = 2 partial vectors, so the S_SEP
// accumulation of partial distances is used). Loads a random codebook, then
// mixes encoding, learning (random learning rates) and decoding operations,
// checking each winner, its distance, the search time and the codebook
// contents after learning against a reference model. Every mechanism
// (load, encode, learn, decode, winner ties, partial-vector accumulation,
// input stalls) must occur at least once.
module som_vq_top_tb;
  import vq_pkg::*;
  localparam int unsigned DW = 16, D = 16, N = 8, NPART = 2;
  localparam int unsigned IW = 3, MAW = 4;
  localparam int unsigned SW = sed_width(DW, D, NPART);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  vq_mode_e mode = MODE_ENCODE;
  logic [IW-1:0] dec_idx = '0;
  logic start_ready, busy;
  logic [DW-1:0] alpha = '0;
  logic x_valid = 1'b0, x_ready;
  logic [D-1:0][DW-1:0] x_data = '0;
  logic cb_we = 1'b0;
  logic [MAW-1:0] cb_addr = '0;
  logic [D-1:0][DW-1:0] cb_wdata = '0;
  logic idx_valid, dec_valid;
  logic [IW-1:0] idx;
  logic [SW-1:0] win_dist;
  logic [D-1:0][DW-1:0] dec_data;
  int checks = 0, failures = 0;

  som_vq_top #(.DW(DW), .D(D), .N(N), .NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "som_vq_tasks.svh"

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    load_codebook();
    for (int i = 0; i < 60; i++) begin
      make_x((i == 0) ? 0 : $urandom_range(0, N - 1), (i % 4 == 0) ? 0 : 3000);
      search_op((i % 3 == 1) ? MODE_LEARN : MODE_ENCODE, DW'($urandom));
      if (i % 3 == 1) decode_op(idx);
      if (i % 7 == 0) decode_op($urandom_range(0, N - 1));
    end
    for (int i = 0; i < N; i++) decode_op(i);
    report_mechanisms();
    check(n_partial_acc > 0, "partial-vector accumulation happened");
    check(n_stall > 0, "input stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
