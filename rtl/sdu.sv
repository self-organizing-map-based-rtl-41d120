// sdu: squared difference unit, one per vector dimension.
//
// The unit subtracts the weight component w from the input component x,
// keeps the difference in a register and feeds it to a multiplier. A
// multiplexer controlled by s1 chooses the multiplier's second operand:
//   s1 = 0 (encoding / winner search): term = (x - w)^2
//   s1 = 1 (codebook learning):        term = alpha * (x - w)
// The subtractor, register, multiplexer and multiplier follow the squared
// difference unit of the design. This implementation's own choices: x and w
// are unsigned DW-bit words, alpha is an unsigned fraction with DW fractional
// bits (alpha = alpha_i / 2^DW) and the learning product is truncated towards
// minus infinity; s1 and w are registered together with the difference so
// that the term, s1 and the weight leave the unit aligned.
//
// Timing: one register stage. Inputs sampled on a rising clk with en = 1
// appear on term / w_q in the following cycle; with en = 0 the register holds.
module sdu #(
  parameter int unsigned DW = vq_pkg::VQ_DW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,     // load the difference register
  input  logic                 s1,     // 0: squared difference, 1: alpha*(x-w)
  input  logic [DW-1:0]        x,      // input vector component
  input  logic [DW-1:0]        w,      // weight vector component
  input  logic [DW-1:0]        alpha,  // learning rate, DW fractional bits
  output logic signed [2*DW+1:0] term, // (x-w)^2 or alpha*(x-w)
  output logic [DW-1:0]        w_q,    // weight, registered with the difference
  output logic                 s1_q    // s1, registered with the difference
);

  logic signed [DW:0]     diff_d, diff_q;
  logic signed [DW:0]     mux_b;
  logic signed [2*DW+1:0] prod;

  // Subtractor.
  assign diff_d = $signed({1'b0, x}) - $signed({1'b0, w});

  // D flip-flops between subtractor and multiplier.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      diff_q <= '0;
      w_q    <= '0;
      s1_q   <= 1'b0;
    end else if (en) begin
      diff_q <= diff_d;
      w_q    <= w;
      s1_q   <= s1;
    end
  end

  // Multiplexer on the multiplier's second operand, then the multiplier.
  always_comb begin
    mux_b = s1_q ? $signed({1'b0, alpha}) : diff_q;
    prod  = diff_q * mux_b;
    term  = s1_q ? (prod >>> DW) : prod;
  end

endmodule
