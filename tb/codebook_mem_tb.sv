// codebook_mem_tb: self-checking test of the codebook memory.
// Fills all 256 words with random data, reads them back in random order,
// checks that rd_data holds while rd_en = 0 and that a read of the word
// being written returns the old contents (read-before-write).
module codebook_mem_tb;
  localparam int unsigned DW = 16, D = 16, DEPTH = 256, AW = 8;
  logic clk = 1'b0, rd_en = 1'b0, we = 1'b0;
  logic [AW-1:0] rd_addr = '0, wr_addr = '0;
  logic [D-1:0][DW-1:0] rd_data, wr_data = '0;
  logic [D-1:0][DW-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  codebook_mem #(.DW(DW), .D(D), .DEPTH(DEPTH), .AW(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0][DW-1:0] rnd_word();
    logic [D-1:0][DW-1:0] v;
    for (int k = 0; k < D; k++) v[k] = DW'($urandom);
    return v;
  endfunction

  task automatic check_read(int a);
    rd_en = 1'b1; rd_addr = AW'(a);
    @(posedge clk); #1;
    rd_en = 1'b0;
    checks++;
    if (rd_data != model[a]) begin
      failures++;
      $display("FAIL read %0d", a);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    for (int a = 0; a < DEPTH; a++) begin
      model[a] = rnd_word();
      we = 1'b1; wr_addr = AW'(a); wr_data = model[a];
      @(posedge clk); #1;
    end
    we = 1'b0;
    for (int i = 0; i < 1000; i++) check_read($urandom_range(0, DEPTH - 1));
    // hold while rd_en = 0
    rd_addr = AW'(rd_addr + 1);
    @(posedge clk); #1;
    checks++;
    if (rd_data != model[rd_addr - 1]) begin failures++; $display("FAIL hold"); end
    // read and write the same word in one cycle
    begin
      logic [D-1:0][DW-1:0] nw = rnd_word();
      rd_en = 1'b1; rd_addr = 8'd17; we = 1'b1; wr_addr = 8'd17; wr_data = nw;
      @(posedge clk); #1;
      rd_en = 1'b0; we = 1'b0;
      checks++;
      if (rd_data != model[17]) begin failures++; $display("FAIL read-before-write"); end
      model[17] = nw;
      check_read(17);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
