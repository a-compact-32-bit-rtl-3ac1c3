// aes_ctrl: the sequencer of the AES-128 chip.
//
// Block processing: when a whole block waits in the input buffer and a key
// is ready, the controller loads the key schedule with the start key for the
// block's direction (cipher key to encipher, last round key to decipher)
// and runs
//   FRD    4 clocks: AddRoundKey of the input words into the state;
//   round  10 x 4 clocks: one column per clock; the last round (LRD) skips
//          (Inv) MixColumn and sends its words to the output buffer.
// In the first clock of each round the next round key is computed, in the
// last clock it becomes current. If the next block is already waiting when
// the last round ends, its first round follows at once, so blocks stream at
// one per 44 clocks.
//
// Key preparation: after key_done_i (a new key read in) the controller, when
// no block is running, loads the cipher key and runs the forward expansion
// ten times (compute, then advance: 2 clocks a step), then stores the last
// round key in the key reader as the deciphering start key. key_ready_o is
// low from key_done_i until this ends (22 clocks). A key that arrives during
// the preparation restarts it.
//
// The states, the key preparation and the overlap of blocks are this
// design's own; the FRD/LRD/Enc-Dec selects are those of the block diagram.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // key reader
  input  logic       key_done_i,
  output logic       dec_key_we_o,
  output logic       key_ready_o,
  // input buffer
  input  logic       buf_full_i,
  input  mode_e      buf_mode_i,
  output logic       buf_release_o,
  // key schedule
  output logic       ks_load_o,
  output logic       ks_load_dec_o,  // start from the deciphering key
  output logic       ks_compute_o,
  output logic       ks_advance_o,
  output mode_e      ks_mode_o,
  // core
  output mode_e      mode_o,
  output logic       frd_o,
  output logic       lrd_o,
  output logic [1:0] col_o,
  output logic       state_we_o,
  // output buffer
  output logic       out_we_o
);
  typedef enum logic [2:0] { S_IDLE, S_PREP_COMP, S_PREP_ADV, S_PREP_CAP, S_FRD, S_ROUND } state_e;

  state_e     st;
  logic [3:0] round;   // 1..10 in S_ROUND, prep step count in S_PREP_*
  logic [1:0] col;
  mode_e      mode;
  logic       key_pending;

  logic start_block, start_prep, last_col;

  assign last_col    = (col == 2'd3);
  assign start_prep  = (st == S_IDLE) && key_pending;
  assign start_block = buf_full_i && key_ready_o && !key_pending &&
                       ((st == S_IDLE) || (st == S_ROUND && round == 4'(NUM_ROUNDS) && last_col));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st          <= S_IDLE;
      round       <= '0;
      col         <= '0;
      mode        <= MODE_ENC;
      key_pending <= 1'b0;
      key_ready_o <= 1'b0;
    end else begin
      if (key_done_i) begin
        key_pending <= 1'b1;
        key_ready_o <= 1'b0;
      end
      unique case (st)
        S_IDLE: begin
          if (start_prep) begin
            key_pending <= key_done_i;
            mode        <= MODE_ENC;
            round       <= '0;
            st          <= S_PREP_COMP;
          end else if (start_block) begin
            mode <= buf_mode_i;
            col  <= '0;
            st   <= S_FRD;
          end
        end
        S_PREP_COMP: st <= S_PREP_ADV;
        S_PREP_ADV: begin
          round <= round + 4'd1;
          st    <= (round == 4'(NUM_ROUNDS - 1)) ? S_PREP_CAP : S_PREP_COMP;
        end
        S_PREP_CAP: begin
          if (!key_pending && !key_done_i) key_ready_o <= 1'b1;
          st <= S_IDLE;
        end
        S_FRD: begin
          col <= col + 2'd1;
          if (last_col) begin
            round <= 4'd1;
            st    <= S_ROUND;
          end
        end
        S_ROUND: begin
          col <= col + 2'd1;
          if (last_col) begin
            if (round != 4'(NUM_ROUNDS)) round <= round + 4'd1;
            else if (start_block) begin
              mode <= buf_mode_i;
              st   <= S_FRD;
            end else st <= S_IDLE;
          end
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    ks_load_o     = start_prep || start_block;
    ks_load_dec_o = start_block && buf_mode_i == MODE_DEC;
    ks_mode_o     = start_prep ? MODE_ENC : (start_block ? buf_mode_i : mode);
    ks_compute_o  = (st == S_PREP_COMP) ||
                    ((st == S_FRD || st == S_ROUND) && col == 2'd0);
    ks_advance_o  = (st == S_PREP_ADV) ||
                    (st == S_FRD && last_col) ||
                    (st == S_ROUND && last_col && round != 4'(NUM_ROUNDS));
    dec_key_we_o  = (st == S_PREP_CAP);
    mode_o        = mode;
    frd_o         = (st == S_FRD);
    lrd_o         = (st == S_ROUND) && round == 4'(NUM_ROUNDS);
    col_o         = col;
    state_we_o    = (st == S_FRD) || (st == S_ROUND);
    out_we_o      = lrd_o;
    buf_release_o = (st == S_FRD) && last_col;
  end


  // A block never starts while the key is being prepared or is stale.
  a_key_ok: assert property (@(posedge clk) disable iff (!rst_n)
    start_block |-> key_ready_o && !key_pending);
  // The input buffer is read only while it holds a whole block.
  a_buf_full: assert property (@(posedge clk) disable iff (!rst_n)
    frd_o |-> buf_full_i);

endmodule
