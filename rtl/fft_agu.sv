// fft_agu: address generating unit and sequencer of the 32-point FFT.
//
// The FFT runs 5 levels (i = 0..4) of 16 butterflies (j = 0..15).  Each
// butterfly takes two cycles: READ presents the two addresses to the data
// memory, whose read is registered, and WRITE puts the butterfly results back
// at the same two addresses of the other memory bank.  The addresses are the
// 5-bit left rotations of 2j and 2j+1 by i, and the twiddle index is j with
// its low 4-i bits cleared (the upper i bits of j, left-aligned in 4 bits).
// The bank read in level i is bank i[0]; the other bank is written.
//
// State sequence (follows the original design):
//   WAIT --start--> CLEAR --> READ --> WRITE --> READ ... --> WRITE(i=4,j=15) --> DONE --> WAIT
// CLEAR resets i and j and tells the peak finder to restart.  `last_level`
// marks the WRITE cycles of level 4, when the results are final.
// `done` is a one-cycle pulse in DONE.  A transform takes 1 + 160 + 1 = 162
// cycles from the cycle after `start` until `done`.
module fft_agu
  import music_box_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     start,
  output fft_adr_t adr_a,
  output fft_adr_t adr_b,
  output tw_adr_t  tw_adr,
  output logic     write,
  output logic     bank_sel,
  output logic     clear,
  output logic     last_level,
  output logic     busy,
  output logic     done
);
  typedef enum logic [2:0] {S_WAIT, S_CLEAR, S_READ, S_WRITE, S_DONE} state_t;

  state_t            state, state_n;
  logic [2:0]        lvl;         // i
  logic [3:0]        bfly;        // j
  logic              last_bfly;

  assign last_bfly = (lvl == 3'(FFT_LOG2N - 1)) && (bfly == 4'd15);

  always_comb begin
    state_n = state;
    case (state)
      S_WAIT:  if (start) state_n = S_CLEAR;
      S_CLEAR: state_n = S_READ;
      S_READ:  state_n = S_WRITE;
      S_WRITE: state_n = last_bfly ? S_DONE : S_READ;
      S_DONE:  state_n = S_WAIT;
      default: state_n = S_WAIT;
    endcase
  end

  always_ff @(posedge clk or posedge rst)
    if (rst) begin
      state <= S_WAIT;
      lvl   <= '0;
      bfly  <= '0;
    end else begin
      state <= state_n;
      if (state == S_CLEAR) begin
        lvl  <= '0;
        bfly <= '0;
      end else if (state == S_WRITE) begin
        bfly <= bfly + 1'b1;                  // wraps 15 -> 0
        if (bfly == 4'd15) lvl <= lvl + 1'b1;
      end
    end

  // Rotate a 5-bit value left by r (0..4).
  function automatic fft_adr_t rotl(input fft_adr_t x, input logic [2:0] r);
    logic [2*FFT_LOG2N-1:0] xx;
    xx = {x, x} << r;
    return xx[2*FFT_LOG2N-1 -: FFT_LOG2N];
  endfunction

  always_comb begin
    adr_a  = rotl({bfly, 1'b0}, lvl);
    adr_b  = rotl({bfly, 1'b1}, lvl);
    tw_adr = bfly & ~(4'hf >> lvl);
  end

  assign write      = (state == S_WRITE);
  assign clear      = (state == S_CLEAR);
  assign done       = (state == S_DONE);
  assign busy       = (state != S_WAIT);
  assign bank_sel   = lvl[0];
  assign last_level = write && (lvl == 3'(FFT_LOG2N - 1));

  // The two butterfly addresses differ only in bit i.
  property p_pair;
    @(posedge clk) disable iff (rst) write |-> ((adr_a ^ adr_b) == fft_adr_t'(1 << lvl));
  endproperty
  assert property (p_pair);
endmodule
