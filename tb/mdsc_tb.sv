// mdsc_tb: self-checking test of the minimum distance search circuit.
// Runs searches over N = 8 code vectors with random SEDs (with deliberate
// ties and gaps between SEDs). Each index is presented LAT = 2 cycles before
// its SED, as the sequencer does. The winner must be the first smallest SED,
// and win_valid must pulse exactly two cycles after the last SED.
module mdsc_tb;
  localparam int unsigned SW = 38, N = 8, IW = 3, LAT = 2;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, sed_valid = 1'b0;
  logic [IW-1:0] tag_in = '0;
  logic [SW-1:0] sed = '0;
  logic win_valid;
  logic [IW-1:0] win_idx;
  logic [SW-1:0] win_dist;
  int checks = 0, failures = 0;

  mdsc #(.SW(SW), .N(N), .IW(IW), .LAT(LAT)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Schedule: index at cycle c, SED at cycle c + LAT (possibly overlapping
  // with the next index, like the real pipeline).
  task automatic search(int mode);
    logic [SW-1:0] d [N];
    logic [SW-1:0] best;
    int bi;
    int gap;
    for (int i = 0; i < N; i++) begin
      case (mode)
        0: d[i] = SW'({$urandom, $urandom});
        1: d[i] = SW'($urandom_range(0, 3));          // many ties
        default: d[i] = SW'(N - i);                   // last one wins
      endcase
    end
    best = d[0]; bi = 0;
    for (int i = 1; i < N; i++) if (d[i] < best) begin best = d[i]; bi = i; end
    clear = 1'b1;
    @(posedge clk); #1;
    clear = 1'b0;
    gap = (mode == 0) ? 1 : 0;
    fork
      for (int i = 0; i < N; i++) begin
        tag_in = IW'(i);
        @(posedge clk); #1;
        tag_in = IW'($urandom);
        repeat (gap) begin @(posedge clk); #1; end
      end
      begin
        repeat (LAT) begin @(posedge clk); #1; end
        for (int i = 0; i < N; i++) begin
          sed = d[i]; sed_valid = 1'b1;
          @(posedge clk); #1;
          sed_valid = 1'b0; sed = SW'($urandom);
          if (i != N - 1) repeat (gap) begin @(posedge clk); #1; end
        end
      end
    join
    // the last SED was taken at the last edge; win_valid two cycles later
    checks++;
    if (win_valid) begin failures++; $display("FAIL win_valid too early"); end
    @(posedge clk); #1;
    checks++;
    if (!win_valid) begin failures++; $display("FAIL win_valid missing"); end
    checks++;
    if (win_idx != IW'(bi) || win_dist != best) begin
      failures++;
      $display("FAIL winner %0d/%0d expected %0d/%0d", win_idx, win_dist, bi, best);
    end
    @(posedge clk); #1;
    checks++;
    if (win_valid) begin failures++; $display("FAIL win_valid longer than one cycle"); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk); #1;
    for (int s = 0; s < 200; s++) search(s % 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
