// rcbat_tb: self-checking test of the reconfigurable adder tree.
// Runs with two partial vectors per vector (NPART = 2) so that S_SEP
// accumulation is exercised: random squared-difference terms are summed here
// and the exact SED must appear one cycle after the S_SEP beat, and only
// then. Learning beats (learn = 1) are mixed in; each lane must return
// w + delta, and they must not disturb a partial sum in progress.
module rcbat_tb;
  localparam int unsigned DW = 16, D = 16, NPART = 2;
  localparam int unsigned SW = vq_pkg::sed_width(DW, D, NPART);
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, learn = 1'b0, sep = 1'b0;
  logic signed [D-1:0][2*DW+1:0] term = '0;
  logic [D-1:0][DW-1:0] w = '0;
  logic sed_valid, upd_valid;
  logic [SW-1:0] sed;
  logic [D-1:0][DW-1:0] upd_w;
  int checks = 0, failures = 0;
  longint acc_ref = 0;

  rcbat #(.DW(DW), .D(D), .NPART(NPART)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One encoding beat; returns the expected exact SED when last.
  task automatic enc_beat(logic last, bit maxval);
    longint s = 0;
    for (int k = 0; k < D; k++) begin
      longint d = maxval ? 65535 : longint'($urandom_range(0, 65535)) - longint'($urandom_range(0, 65535));
      term[k] = (2*DW+2)'(d * d);
      s += d * d;
    end
    acc_ref += s;
    in_valid = 1'b1; learn = 1'b0; sep = last;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (sed_valid !== last) begin
      failures++;
      $display("FAIL sed_valid=%0b expected %0b", sed_valid, last);
    end
    if (last) begin
      checks++;
      if (longint'(sed) != acc_ref) begin
        failures++;
        $display("FAIL sed=%0d expected %0d", sed, acc_ref);
      end
      acc_ref = 0;
    end
  endtask

  task automatic learn_beat();
    logic [D-1:0][DW-1:0] e;
    for (int k = 0; k < D; k++) begin
      int unsigned wv = $urandom_range(0, 65535);
      int unsigned xv = $urandom_range(0, 65535);
      int unsigned av = $urandom_range(0, 65535);
      longint dl = ((longint'(xv) - longint'(wv)) * longint'(av)) >>> 16;
      w[k] = DW'(wv);
      term[k] = (2*DW+2)'(dl);
      e[k] = DW'(longint'(wv) + dl);
    end
    in_valid = 1'b1; learn = 1'b1; sep = 1'b0;
    @(posedge clk); #1;
    in_valid = 1'b0;
    checks++;
    if (!upd_valid || sed_valid || upd_w != e) begin
      failures++;
      $display("FAIL learn beat: upd_valid=%0b", upd_valid);
      for (int k = 0; k < D; k++)
        if (upd_w[k] != e[k]) $display("  lane %0d got %0d expected %0d", k, upd_w[k], e[k]);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    // largest possible SED
    enc_beat(1'b0, 1'b1);
    enc_beat(1'b1, 1'b1);
    for (int v = 0; v < 200; v++) begin
      enc_beat(1'b0, 1'b0);
      if (v % 3 == 0) learn_beat();
      enc_beat(1'b1, 1'b0);
      if (v % 5 == 0) begin
        // idle cycle: nothing must come out
        @(posedge clk); #1;
        checks++;
        if (sed_valid || upd_valid) begin
          failures++;
          $display("FAIL output without input");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
