// som_vq_image_tb: image compression workload on the full-size quantizer
// (all parameters at their defaults).
//
// A 512x512 8-bit test image is generated here (a smooth gradient, a
// checkerboard of 32x32 tiles and small noise) and cut into 4x4 blocks,
// giving 16384 vectors of 16 components. Pixels enter as 16-bit words with
// 8 fractional bits (pixel << 8) so that learning can make fractional moves.
//   1. The codebook starts as 256 blocks taken at equal distances through
//      the image and is loaded through the load port.
//   2. Codebook learning: every 8th block (2048 vectors) is presented in
//      learning mode with alpha = 1/16.
//   3. Image encoding: all 16384 blocks are encoded.
// Every winner, distance and search time is checked against the reference
// model, the final codebook is read back by decoding, and the reconstructed
// image's PSNR is computed and must exceed 20 dB. The compressed image is
// 16384 indices of 8 bits: 16 KiB instead of 256 KiB, 0.5 bit per pixel.
module som_vq_image_tb;
  import vq_pkg::*;
  localparam int unsigned DW = VQ_DW, D = VQ_D, N = VQ_N, NPART = VQ_NPART;
  localparam int unsigned IW = $clog2(N), MAW = $clog2(N * NPART);
  localparam int unsigned SW = sed_width(DW, D, NPART);
  localparam int IMG = 512, BS = 4, BPR = IMG / BS, NBLK = BPR * BPR;

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

  som_vq_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (8_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  `include "som_vq_tasks.svh"

  byte unsigned img [IMG][IMG];
  logic [IW-1:0] code [NBLK];

  function automatic part_t block_vec(int b);
    part_t v;
    int br = b / BPR, bc = b % BPR;
    for (int k = 0; k < D; k++)
      v[k] = DW'({img[br * BS + k / BS][bc * BS + k % BS], 8'h00});
    return v;
  endfunction

  initial begin
    real mse, psnr;
    int p, rec, org;
    for (int r = 0; r < IMG; r++)
      for (int c = 0; c < IMG; c++) begin
        p = (r + c) / 5 + ((((r / 32) + (c / 32)) % 2) * 40) + $urandom_range(0, 6);
        img[r][c] = 8'(p);
      end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;

    // 1. initial codebook
    for (int n = 0; n < N; n++) begin
      cb_model[n] = block_vec(n * (NBLK / N) + (NBLK / N) / 2);
      cb_we = 1'b1; cb_addr = MAW'(n); cb_wdata = cb_model[n];
      @(posedge clk); #1;
      n_load++;
    end
    cb_we = 1'b0;

    // 2. codebook learning
    for (int b = 0; b < NBLK; b += 8) begin
      xin[0] = block_vec(b);
      search_op(MODE_LEARN, DW'(16'h1000));
    end

    // 3. encoding
    for (int b = 0; b < NBLK; b++) begin
      xin[0] = block_vec(b);
      search_op(MODE_ENCODE, '0);
      code[b] = idx;
    end

    // final codebook, read back
    for (int n = 0; n < N; n++) decode_op(n);

    // reconstruction quality (rounded to 8 bits)
    mse = 0.0;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < D; k++) begin
        rec = (int'(cb_model[code[b]][k]) + 128) >> 8;
        org = int'(img[(b / BPR) * BS + k / BS][(b % BPR) * BS + k % BS]);
        if (rec > 255) rec = 255;
        mse += real'((rec - org) * (rec - org));
      end
    mse = mse / real'(IMG * IMG);
    psnr = 10.0 * $log10(255.0 * 255.0 / mse);
    $display("image %0dx%0d: learned %0d, encoded %0d, decoded %0d; MSE %f, PSNR %f dB",
             IMG, IMG, n_learn, n_encode, n_decode, mse, psnr);
    check(n_learn == NBLK / 8 && n_encode == NBLK, "all vectors processed");
    check(psnr > 20.0, "PSNR above 20 dB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
