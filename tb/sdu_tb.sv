// sdu_tb: self-checking test of the squared difference unit.
// Drives random x, w, alpha and s1 and compares term, w_q and s1_q one cycle
// later with (x-w)^2 or floor(alpha*(x-w)/2^16) computed here in 64-bit
// integers. Also checks that the register holds while en = 0 and the corner
// cases x = 0 / w = max and x = max / w = 0.
module sdu_tb;
  localparam int unsigned DW = 16;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, s1 = 1'b0;
  logic [DW-1:0] x = '0, w = '0, alpha = '0;
  logic signed [2*DW+1:0] term;
  logic [DW-1:0] w_q;
  logic s1_q;
  int checks = 0, failures = 0;

  sdu #(.DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint expect_term(logic [DW-1:0] xx, logic [DW-1:0] ww,
                                         logic [DW-1:0] aa, logic ss);
    longint d = longint'(xx) - longint'(ww);
    if (!ss) return d * d;
    // floor division by 2^DW
    return (d * longint'(aa)) >>> DW;
  endfunction

  task automatic apply_check(logic [DW-1:0] xx, logic [DW-1:0] ww,
                             logic [DW-1:0] aa, logic ss);
    longint e = expect_term(xx, ww, aa, ss);
    x = xx; w = ww; alpha = aa; s1 = ss; en = 1'b1;
    @(posedge clk); #1;
    en = 1'b0;
    checks++;
    if (longint'(term) != e || w_q != ww || s1_q != ss) begin
      failures++;
      $display("FAIL x=%0d w=%0d a=%0d s1=%0d term=%0d expect=%0d", xx, ww, aa, ss, term, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    apply_check(16'h0000, 16'hFFFF, 16'h0000, 1'b0);
    apply_check(16'hFFFF, 16'h0000, 16'h0000, 1'b0);
    apply_check(16'h0000, 16'hFFFF, 16'h8000, 1'b1);
    apply_check(16'h1234, 16'h1234, 16'h4000, 1'b1);
    for (int i = 0; i < 500; i++)
      apply_check(DW'($urandom), DW'($urandom), DW'($urandom), 1'(i % 2));
    // hold while en = 0
    apply_check(16'd10, 16'd3, 16'd0, 1'b0);
    x = 16'd100; w = 16'd0;
    @(posedge clk); #1;
    checks++;
    if (term != 49) begin
      failures++;
      $display("FAIL register did not hold: %0d", term);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
