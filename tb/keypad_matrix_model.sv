// keypad_matrix_model: behavioural model of a passive 4x4 key matrix.
//
// pressed[4*r + c] closes the switch between row r and column c, so a row
// reads high when any closed switch in it connects to a column driven high.
module keypad_matrix_model (
  input  logic [15:0] pressed,
  input  logic [3:0]  cols,
  output logic [3:0]  rows
);
  always_comb
    for (int r = 0; r < 4; r++) begin
      rows[r] = 1'b0;
      for (int c = 0; c < 4; c++) rows[r] |= pressed[4 * r + c] & cols[c];
    end
endmodule
