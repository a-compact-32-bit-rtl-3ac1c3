// data_output_buffer: gathers the four result words of a block and sends
// them out on Data Out.
//
// The core delivers the words of the last round one per clock (we_i with
// wr_idx_i = 0..3). Once word 3 is in, the buffer drives data_out_o with
// words 0, 1, 2, 3 in four consecutive clocks and holds data_ready_o high
// in exactly those clocks. Output words and the strobe are registered. The
// next block's results arrive at least 44 clocks later, so the buffer never
// has to hold two blocks.
module data_output_buffer
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       we_i,
  input  logic [1:0] wr_idx_i,
  input  word_t      wr_word_i,
  output word_t      data_out_o,
  output logic       data_ready_o
);
  word_t      w [4];
  logic       sending;
  logic [1:0] out_idx;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < 4; i++) w[i] <= '0;
      sending      <= 1'b0;
      out_idx      <= '0;
      data_out_o   <= '0;
      data_ready_o <= 1'b0;
    end else begin
      if (we_i) w[wr_idx_i] <= wr_word_i;
      data_ready_o <= 1'b0;
      if (we_i && wr_idx_i == 2'd3) begin
        sending <= 1'b1;
        out_idx <= '0;
      end else if (sending) begin
        data_out_o   <= w[out_idx];
        data_ready_o <= 1'b1;
        out_idx      <= out_idx + 2'd1;
        if (out_idx == 2'd3) sending <= 1'b0;
      end
    end
  end
endmodule
