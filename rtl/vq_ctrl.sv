// vq_ctrl: sequencer of the self-organizing-map vector quantizer.
//
// Encoding mode (s1 = 0): the input vector is taken in as NPART partial
// vectors of D components and kept in a buffer. Then the partial weight
// vectors of all N neurons are read from the codebook memory one per cycle,
// each paired with the matching partial input vector, and sent through the
// squared difference units and the adder tree. S_SEP is 0 for all but the
// last partial vector of a neuron; with that beat the neuron's index is
// handed to the minimum distance search circuit. When the search circuit
// reports the winner its index is output.
// Learning mode: the same search, then s1 is set to 1, the winner's start
// address is loaded into the read port and its partial weight vectors are
// read out in sequence; the adder tree returns w + alpha*(x - w) for each
// and they are written back to the same addresses.
// Decoding mode: the NPART partial vectors of a given index are read out.
// The two modes, s1, S_SEP and reading the winner from its start address
// follow the design; the handshakes, the decoding mode and the state machine
// itself are this implementation's choices.
//
// Interface and timing: start is taken in IDLE (start_ready = 1) with mode
// and dec_idx. Partial input vectors are accepted with x_valid && x_ready.
// rd_en/rd_addr go to the memory; dp_* are registered and therefore line up
// with the memory's read data one cycle later. idx_valid pulses with the
// winner index; dec_valid marks decoded partial vectors on the memory's read
// data. A search reads N*NPART words on consecutive cycles; idx_valid rises
// N*NPART + 5 cycles after the first read.
module vq_ctrl
  import vq_pkg::*;
#(
  parameter int unsigned DW    = VQ_DW,
  parameter int unsigned D     = VQ_D,
  parameter int unsigned N     = VQ_N,
  parameter int unsigned NPART = VQ_NPART,
  parameter int unsigned IW    = (N > 1) ? $clog2(N) : 1,
  parameter int unsigned PW    = (NPART > 1) ? $clog2(NPART) : 1,
  parameter int unsigned MAW   = (N * NPART > 1) ? $clog2(N * NPART) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // command
  input  logic                 start,
  input  vq_mode_e             mode,
  input  logic [IW-1:0]        dec_idx,
  output logic                 start_ready,
  output logic                 busy,
  // input vector, NPART partial vectors
  input  logic                 x_valid,
  output logic                 x_ready,
  input  logic [D-1:0][DW-1:0] x_data,
  // codebook memory
  output logic                 rd_en,
  output logic [MAW-1:0]       rd_addr,
  output logic                 wr_en,
  output logic [MAW-1:0]       wr_addr,
  output logic [D-1:0][DW-1:0] wr_data,
  // datapath controls, aligned with the memory read data
  output logic                 dp_valid,
  output logic                 dp_s1,
  output logic                 dp_sep,
  output logic [IW-1:0]        dp_tag,
  output logic [D-1:0][DW-1:0] dp_x,
  output logic                 dec_valid,
  // search circuit and adder tree
  output logic                 mdsc_clear,
  input  logic                 win_valid,
  input  logic [IW-1:0]        win_idx,
  input  logic                 upd_valid,
  input  logic [D-1:0][DW-1:0] upd_w,
  // result
  output logic                 idx_valid,
  output logic [IW-1:0]        idx
);

  typedef enum logic [2:0] {
    S_IDLE, S_LOAD, S_SEARCH, S_WAIT, S_LRD, S_LWR, S_DEC
  } state_e;

  state_e              state;
  vq_mode_e            mode_q;
  logic [IW-1:0]       n_cnt;     // neuron being read
  logic [PW-1:0]       p_cnt;     // partial vector being read
  logic [PW-1:0]       w_cnt;     // write-backs done
  logic [IW-1:0]       win_q;     // winner (or index to decode)
  logic [D-1:0][DW-1:0] xbuf [NPART];
  logic [PW-1:0]       dp_p;

  logic last_p;
  assign last_p = (p_cnt == PW'(NPART - 1));

  function automatic logic [MAW-1:0] start_addr(logic [IW-1:0] n);
    return MAW'(n) * MAW'(NPART);
  endfunction

  assign start_ready = (state == S_IDLE);
  assign busy        = (state != S_IDLE);
  assign x_ready     = (state == S_LOAD);

  // Read port: all neurons while searching, the winner while learning, the
  // requested index while decoding.
  always_comb begin
    rd_en   = 1'b0;
    rd_addr = '0;
    unique case (state)
      S_SEARCH: begin
        rd_en   = 1'b1;
        rd_addr = start_addr(n_cnt) + MAW'(p_cnt);
      end
      S_LRD, S_DEC: begin
        rd_en   = 1'b1;
        rd_addr = start_addr(win_q) + MAW'(p_cnt);
      end
      default: ;
    endcase
  end

  assign wr_en   = (state == S_LWR) && upd_valid;
  assign wr_addr = start_addr(win_q) + MAW'(w_cnt);
  assign wr_data = upd_w;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_q     <= MODE_ENCODE;
      n_cnt      <= '0;
      p_cnt      <= '0;
      w_cnt      <= '0;
      win_q      <= '0;
      mdsc_clear <= 1'b0;
      idx_valid  <= 1'b0;
      idx        <= '0;
    end else begin
      mdsc_clear <= 1'b0;
      idx_valid  <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          mode_q <= mode;
          p_cnt  <= '0;
          n_cnt  <= '0;
          w_cnt  <= '0;
          win_q  <= dec_idx;
          state  <= (mode == MODE_DECODE) ? S_DEC : S_LOAD;
        end
        S_LOAD: if (x_valid) begin
          p_cnt <= last_p ? '0 : p_cnt + 1'b1;
          if (last_p) begin
            mdsc_clear <= 1'b1;
            state      <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          p_cnt <= last_p ? '0 : p_cnt + 1'b1;
          if (last_p) begin
            n_cnt <= n_cnt + 1'b1;
            if (n_cnt == IW'(N - 1)) state <= S_WAIT;
          end
        end
        S_WAIT: if (win_valid) begin
          idx_valid <= 1'b1;
          idx       <= win_idx;
          win_q     <= win_idx;
          state     <= (mode_q == MODE_LEARN) ? S_LRD : S_IDLE;
        end
        S_LRD: begin
          p_cnt <= last_p ? '0 : p_cnt + 1'b1;
          if (last_p) state <= S_LWR;
        end
        S_LWR: if (upd_valid) begin
          w_cnt <= w_cnt + 1'b1;
          if (w_cnt == PW'(NPART - 1)) state <= S_IDLE;
        end
        S_DEC: begin
          p_cnt <= last_p ? '0 : p_cnt + 1'b1;
          if (last_p) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Input vector buffer.
  always_ff @(posedge clk) begin
    if (state == S_LOAD && x_valid) xbuf[p_cnt] <= x_data;
  end

  // Control pipeline stage matching the memory's read latency.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dp_valid  <= 1'b0;
      dp_s1     <= 1'b0;
      dp_sep    <= 1'b0;
      dp_tag    <= '0;
      dp_p      <= '0;
      dec_valid <= 1'b0;
    end else begin
      dp_valid  <= (state == S_SEARCH) || (state == S_LRD);
      dp_s1     <= (state == S_LRD);
      dp_sep    <= last_p;
      dp_tag    <= n_cnt;
      dp_p      <= p_cnt;
      dec_valid <= (state == S_DEC);
    end
  end

  assign dp_x = xbuf[dp_p];

  // A partial input vector that is offered stays offered until taken.
  assert property (@(posedge clk) disable iff (!rst_n)
                   x_valid && !x_ready |=> x_valid)
    else $error("vq_ctrl: x_valid dropped before x_ready");

endmodule
