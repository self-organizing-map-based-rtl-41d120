// vq_ctrl_tb: self-checking test of the quantizer's sequencer, with N = 4
// code vectors of NPART = 2 partial vectors each. The search circuit and the
// adder tree are played by the testbench. Checked: the read address sequence
// of a search (all neurons, one partial vector per cycle, N*NPART cycles),
// the datapath controls one cycle later (S_SEP on the last partial vector,
// the neuron index, the matching partial input vector, s1), the search-start
// clear, the winner index output, the learning read-out of the winner and
// the write-back of the updated weights, and the decoding read-out.
module vq_ctrl_tb;
  import vq_pkg::*;
  localparam int unsigned DW = 16, D = 16, N = 4, NPART = 2;
  localparam int unsigned IW = 2, PW = 1, MAW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0;
  vq_mode_e mode = MODE_ENCODE;
  logic [IW-1:0] dec_idx = '0;
  logic start_ready, busy;
  logic x_valid = 1'b0, x_ready;
  logic [D-1:0][DW-1:0] x_data = '0;
  logic rd_en, wr_en;
  logic [MAW-1:0] rd_addr, wr_addr;
  logic [D-1:0][DW-1:0] wr_data;
  logic dp_valid, dp_s1, dp_sep, dec_valid, mdsc_clear;
  logic [IW-1:0] dp_tag;
  logic [D-1:0][DW-1:0] dp_x;
  logic win_valid = 1'b0, upd_valid = 1'b0;
  logic [IW-1:0] win_idx = '0;
  logic [D-1:0][DW-1:0] upd_w = '0;
  logic idx_valid;
  logic [IW-1:0] idx;
  int checks = 0, failures = 0;

  vq_ctrl #(.DW(DW), .D(D), .N(N), .NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic [D-1:0][DW-1:0] xv [NPART];

  // Send the input vector, with one idle cycle between the partial vectors.
  task automatic send_x();
    for (int p = 0; p < NPART; p++) begin
      for (int k = 0; k < D; k++) xv[p][k] = DW'($urandom);
      x_valid = 1'b1; x_data = xv[p];
      while (!x_ready) begin @(posedge clk); #1; end
      @(posedge clk); #1;
      x_valid = 1'b0;
      if (p != NPART - 1) begin @(posedge clk); #1; end
    end
  endtask

  // Wait for the read burst and check it and the controls that follow it.
  task automatic expect_burst(int first_addr, int nbeats, bit s1, bit search, bit dec);
    int guard = 0;
    while (!rd_en && guard < 100) begin @(posedge clk); #1; guard++; end
    for (int b = 0; b < nbeats; b++) begin
      check(rd_en && rd_addr == MAW'(first_addr + b), "read address");
      @(posedge clk); #1;
      check(dp_valid == !dec && dp_s1 == s1 && dec_valid == dec, "datapath valid/s1/dec");
      check(dp_sep == ((b % NPART) == NPART - 1), "S_SEP");
      if (search) check(dp_tag == IW'(b / NPART), "neuron index");
      if (!dec) check(dp_x == xv[b % NPART], "partial input vector");
    end
    check(!rd_en, "burst length");
  endtask

  task automatic run(vq_mode_e m, int win);
    int seen_clear = 0;
    @(posedge clk); #1;
    check(start_ready && !busy, "idle before start");
    start = 1'b1; mode = m; dec_idx = IW'(win);
    @(posedge clk); #1;
    start = 1'b0;
    if (m == MODE_DECODE) begin
      expect_burst(win * NPART, NPART, 1'b0, 1'b0, 1'b1);
    end else begin
      fork
        send_x();
        begin
          while (!mdsc_clear) begin @(posedge clk); #1; end
          seen_clear = 1;
        end
      join
      check(seen_clear == 1, "search clear");
      expect_burst(0, N * NPART, 1'b0, 1'b1, 1'b0);
      repeat (3) begin @(posedge clk); #1; check(busy && !idx_valid, "waiting"); end
      win_valid = 1'b1; win_idx = IW'(win);
      @(posedge clk); #1;
      win_valid = 1'b0; win_idx = '0;
      check(idx_valid && idx == IW'(win), "index output");
      if (m == MODE_LEARN) begin
        expect_burst(win * NPART, NPART, 1'b1, 1'b0, 1'b0);
        for (int p = 0; p < NPART; p++) begin
          repeat (2) begin @(posedge clk); #1; check(!wr_en, "no write without update"); end
          for (int k = 0; k < D; k++) upd_w[k] = DW'($urandom);
          upd_valid = 1'b1;
          #1;
          check(wr_en && wr_addr == MAW'(win * NPART + p) && wr_data == upd_w, "write-back");
          @(posedge clk); #1;
          upd_valid = 1'b0;
        end
      end
    end
    @(posedge clk); #1;
    check(start_ready && !busy, "idle after operation");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 12; i++) begin
      run(MODE_ENCODE, $urandom_range(0, N - 1));
      run(MODE_LEARN, $urandom_range(0, N - 1));
      run(MODE_DECODE, $urandom_range(0, N - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
