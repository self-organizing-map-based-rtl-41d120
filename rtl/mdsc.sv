// mdsc: minimum distance search circuit (winner-takes-all).
//
// Each exact squared Euclidean distance (SED) that leaves the adder tree is
// loaded into R1 together with the index of its code vector. In the next
// cycle a comparator checks R1 against R2, the smallest SED seen so far; if
// it is smaller (or it is the first SED of the search) R2 takes the SED and
// R3 its index. After N SEDs the search is over and R3 is the winner.
// The index of a code vector is issued by the sequencer when the last partial
// vector of that code vector enters the datapath; a shift register of LAT
// stages delays it so that it meets its SED at R1.
// R1/R2/R3, the comparator and the shift register follow the design. The
// fixed-latency tag delay, ties going to the lower index (strict less-than)
// and the search-start clear are this implementation's choices.
//
// Timing: clear one cycle before the first SED of a search. tag_in must be
// given LAT cycles before its sed_valid. win_valid pulses two cycles after
// the N-th sed_valid, with win_idx and win_dist held until the next clear.
module mdsc #(
  parameter int unsigned SW  = vq_pkg::sed_width(vq_pkg::VQ_DW, vq_pkg::VQ_D,
                                                 vq_pkg::VQ_NPART),
  parameter int unsigned N   = vq_pkg::VQ_N,
  parameter int unsigned IW  = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned LAT = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,      // start a new search
  input  logic [IW-1:0] tag_in,     // code vector index, LAT cycles early
  input  logic          sed_valid,  // S_SEP: exact SED present
  input  logic [SW-1:0] sed,
  output logic          win_valid,  // search finished (one-cycle pulse)
  output logic [IW-1:0] win_idx,    // R3
  output logic [SW-1:0] win_dist    // R2
);

  // Shift register carrying the index to meet its SED.
  logic [IW-1:0] tag_sr [LAT];
  always_ff @(posedge clk) begin
    tag_sr[0] <= tag_in;
    for (int i = 1; i < LAT; i++) tag_sr[i] <= tag_sr[i-1];
  end

  logic [SW-1:0] r1;
  logic [IW-1:0] r1_idx;
  logic          r1_valid;
  logic          have_min;
  logic [$clog2(N+1)-1:0] cnt;
  logic          take;

  // Comparator gated with "R1 holds a new SED" (the AND gates).
  assign take = r1_valid && (!have_min || (r1 < win_dist));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1        <= '0;
      r1_idx    <= '0;
      r1_valid  <= 1'b0;
      win_dist  <= '0;
      win_idx   <= '0;
      have_min  <= 1'b0;
      cnt       <= '0;
      win_valid <= 1'b0;
    end else begin
      r1        <= sed;
      r1_idx    <= tag_sr[LAT-1];
      r1_valid  <= sed_valid && !clear;
      win_valid <= 1'b0;
      if (clear) begin
        have_min <= 1'b0;
        cnt      <= '0;
      end else if (r1_valid) begin
        have_min <= 1'b1;
        cnt      <= cnt + 1'b1;
        if (take) begin
          win_dist <= r1;
          win_idx  <= r1_idx;
        end
        if (cnt == $bits(cnt)'(N - 1)) win_valid <= 1'b1;
      end
    end
  end

endmodule
