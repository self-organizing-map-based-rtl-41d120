// som_vq_tasks.svh: stimulus and reference model shared by the end-to-end
// testbenches of som_vq_top. Included inside a testbench module that has
// declared DW, D, N, NPART, IW, MAW, SW, the top's signals, clk, checks and
// failures. The reference model keeps its own copy of the codebook, finds the
// winner by brute force (first smallest squared Euclidean distance) and
// applies w + floor(alpha * (x - w) / 2^DW) to the winner when learning.

typedef logic [D-1:0][DW-1:0] part_t;
part_t cb_model [N * NPART];
part_t xin [NPART];
int n_encode = 0, n_learn = 0, n_decode = 0, n_tie = 0, n_load = 0;
int n_stall = 0;
int n_partial_acc = 0;  // partial SEDs accumulated under S_SEP = 0, in correct searches

task automatic check(bit ok, string what);
  checks++;
  if (!ok) begin
    failures++;
    $display("FAIL %s at %0t", what, $time);
  end
endtask

function automatic longint ref_sed(int n);
  longint s = 0;
  for (int p = 0; p < NPART; p++)
    for (int k = 0; k < D; k++) begin
      longint d = longint'(xin[p][k]) - longint'(cb_model[n * NPART + p][k]);
      s += d * d;
    end
  return s;
endfunction

// Write the whole codebook through the load port. Code vector 1 is a copy
// of code vector 0 so that searches can meet exact ties.
task automatic load_codebook();
  for (int a = 0; a < N * NPART; a++) begin
    part_t v;
    if (a / NPART == 1) v = cb_model[a - NPART];
    else for (int k = 0; k < D; k++) v[k] = DW'($urandom);
    cb_model[a] = v;
    cb_we = 1'b1; cb_addr = MAW'(a); cb_wdata = v;
    @(posedge clk); #1;
    n_load++;
  end
  cb_we = 1'b0;
endtask

// Input vector near code vector `near`, or a copy of it.
task automatic make_x(int near, int spread);
  for (int p = 0; p < NPART; p++)
    for (int k = 0; k < D; k++) begin
      int v = int'(cb_model[near * NPART + p][k]) + $urandom_range(0, 2 * spread) - spread;
      if (v < 0) v = 0;
      if (v > (1 << DW) - 1) v = (1 << DW) - 1;
      xin[p][k] = DW'(v);
    end
endtask

// One encoding or learning operation. Checks the winner, its SED and the
// search time: N*NPART partial vectors at one per cycle plus a fixed
// pipeline of 6 cycles, counted from the cycle after the last input beat.
task automatic search_op(vq_mode_e m, logic [DW-1:0] a);
  longint best;
  int bi, cyc, ties;
  best = ref_sed(0); bi = 0; ties = 0;
  for (int n = 1; n < N; n++) begin
    longint s = ref_sed(n);
    if (s < best) begin best = s; bi = n; ties = 0; end
    else if (s == best) ties++;
  end
  if (ties > 0) n_tie++;
  while (!start_ready) begin @(posedge clk); #1; end
  start = 1'b1; mode = m; alpha = a;
  @(posedge clk); #1;
  start = 1'b0;
  for (int p = 0; p < NPART; p++) begin
    x_valid = 1'b1; x_data = xin[p];
    while (!x_ready) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    x_valid = 1'b0;
    // hold the next beat back for a cycle now and then
    if (p != NPART - 1 && $urandom_range(0, 1) == 1) begin
      n_stall++;
      @(posedge clk); #1;
    end
  end
  cyc = 0;
  while (!idx_valid && cyc < 10 * N * NPART + 100) begin @(posedge clk); #1; cyc++; end
  check(idx_valid, "index produced");
  check(idx == IW'(bi), $sformatf("winner index %0d expected %0d", idx, bi));
  check(longint'(win_dist) == best, $sformatf("winner SED %0d expected %0d", win_dist, best));
  if (longint'(win_dist) == best) n_partial_acc += N * (NPART - 1);
  check(cyc == N * NPART + 5, $sformatf("search took %0d cycles, expected %0d", cyc + 1, N * NPART + 6));
  if (m == MODE_LEARN) begin
    for (int p = 0; p < NPART; p++)
      for (int k = 0; k < D; k++) begin
        longint w = longint'(cb_model[bi * NPART + p][k]);
        longint d = longint'(xin[p][k]) - w;
        cb_model[bi * NPART + p][k] = DW'(w + ((d * longint'(a)) >>> DW));
      end
    n_learn++;
  end else n_encode++;
  while (!start_ready) begin @(posedge clk); #1; end
endtask

// Read back the code vector of index i and compare it with the model.
task automatic decode_op(int i);
  int got = 0, cyc = 0;
  while (!start_ready) begin @(posedge clk); #1; end
  start = 1'b1; mode = MODE_DECODE; dec_idx = IW'(i);
  @(posedge clk); #1;
  start = 1'b0;
  while (got < NPART && cyc < 20) begin
    if (dec_valid) begin
      check(dec_data == cb_model[i * NPART + got], $sformatf("decoded vector %0d part %0d", i, got));
      got++;
    end
    @(posedge clk); #1;
    cyc++;
  end
  check(got == NPART, "decoded partial vectors");
  n_decode++;
endtask

task automatic report_mechanisms();
  $display("mechanisms: load=%0d encode=%0d learn=%0d decode=%0d tie=%0d input_stall=%0d partial_acc=%0d",
           n_load, n_encode, n_learn, n_decode, n_tie, n_stall, n_partial_acc);
  check(n_load > 0, "codebook load happened");
  check(n_encode > 0, "encoding happened");
  check(n_learn > 0, "learning happened");
  check(n_decode > 0, "decoding happened");
  check(n_tie > 0, "tie in the winner search happened");
endtask
