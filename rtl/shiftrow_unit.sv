// shiftrow_unit: the 16x8-bit state register and the ShiftRow / Inverse
// ShiftRow switch matrix that feeds the column datapath.
//
// Byte k of the register is row (k mod 4) of column (k div 4), as in the
// figure of the switch matrix (column 0 = bytes 0..3). For the selected
// output column c the switches pick, per row r,
//   ShiftRow:          byte (r, (c + r) mod 4)
//   Inverse ShiftRow:  byte (r, (c - r) mod 4)
// Row 0 and row 2 take the same byte in both directions, so only rows 1 and 3
// need an Enc/Dec multiplexer. The switch is combinational, so one column
// leaves the register every clock.
//
// Writing: a round reads every column of the old state before any new
// column may replace it, so columns 0..2 of the new state wait in a 3-word
// holding buffer and the whole register is loaded when column 3 is written.
// The caller therefore writes columns in the order 0, 1, 2, 3. The write
// timing and the holding buffer are this design's own choice; they let a
// round take exactly four clocks.
module shiftrow_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // write port: one new column per clock, in order 0..3
  input  logic       we_i,
  input  logic [1:0] wr_col_i,
  input  word_t      wr_word_i,
  // read port: shifted column rd_col_i of the current state
  input  logic [1:0] rd_col_i,
  input  mode_e      mode_i,    // MODE_ENC: ShiftRow, MODE_DEC: Inverse ShiftRow
  output word_t      rd_word_o
);
  byte_t st [16];
  word_t hold [3];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < 16; k++) st[k] <= '0;
      for (int k = 0; k < 3; k++)  hold[k] <= '0;
    end else if (we_i) begin
      if (wr_col_i == 2'd3) begin
        for (int c = 0; c < 3; c++)
          for (int r = 0; r < 4; r++) st[4*c + r] <= get_byte(hold[c], r);
        for (int r = 0; r < 4; r++) st[12 + r] <= get_byte(wr_word_i, r);
      end else begin
        hold[wr_col_i] <= wr_word_i;
      end
    end
  end

  always_comb begin
    logic [1:0] src;
    byte_t      b [4];
    for (int r = 0; r < 4; r++) begin
      if (mode_i == MODE_DEC) src = rd_col_i - 2'(r);
      else                    src = rd_col_i + 2'(r);
      b[r] = st[4*int'(src) + r];
    end
    rd_word_o = {b[0], b[1], b[2], b[3]};
  end
endmodule
