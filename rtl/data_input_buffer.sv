// data_input_buffer: holds one 128-bit input block (plaintext or
// ciphertext) until the core takes it.
//
// Protocol: while load_ready_o is high the host may start a block by raising
// aes_start_i for one clock with word 0 on data_in_i and the Enc/Dec choice
// on mode_i; words 1, 2 and 3 follow on data_in_i in the next three clocks.
// load_ready_o is low from the start pulse until the core has read the
// block. full_o tells the controller a whole block is waiting; the
// controller reads it word by word (rd_idx_i) during the first round and
// frees it with release_i. Because the buffer is separate from the state
// register, the next block can be loaded while the current one is being
// processed. An aes_start_i while load_ready_o is low is ignored.
module data_input_buffer
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       aes_start_i,
  input  mode_e      mode_i,
  input  word_t      data_in_i,
  output logic       load_ready_o,
  output logic       full_o,
  output mode_e      mode_o,
  input  logic [1:0] rd_idx_i,
  output word_t      rd_word_o,
  input  logic       release_i
);
  typedef enum logic [1:0] { B_EMPTY, B_FILL, B_FULL } buf_state_e;

  buf_state_e st;
  word_t      w [4];
  logic [1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st     <= B_EMPTY;
      cnt    <= '0;
      mode_o <= MODE_ENC;
      for (int i = 0; i < 4; i++) w[i] <= '0;
    end else begin
      unique case (st)
        B_EMPTY: if (aes_start_i) begin
          w[0]   <= data_in_i;
          mode_o <= mode_i;
          cnt    <= 2'd1;
          st     <= B_FILL;
        end
        B_FILL: begin
          w[cnt] <= data_in_i;
          cnt    <= cnt + 2'd1;
          if (cnt == 2'd3) st <= B_FULL;
        end
        B_FULL: if (release_i) st <= B_EMPTY;
        default: st <= B_EMPTY;
      endcase
    end
  end

  assign load_ready_o = (st == B_EMPTY);
  assign full_o       = (st == B_FULL);
  assign rd_word_o    = w[rd_idx_i];
endmodule
