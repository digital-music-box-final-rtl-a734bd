// fft_bank_ram: one bank of the FFT data memory.
//
// 32 complex words with two synchronous ports, A and B.  Each port writes its
// data when its write enable is high and otherwise reads; a read returns the
// addressed word one cycle later, and a write also shows the written word on
// that port's output (write-first), as a true dual-port FPGA block RAM does.
// The FFT never writes both ports to one address in one cycle; if it did,
// port B would win.
module fft_bank_ram
  import music_box_pkg::*;
(
  input  logic     clk,
  input  logic     we_a,
  input  fft_adr_t adr_a,
  input  cplx_t    wdata_a,
  output cplx_t    rdata_a,
  input  logic     we_b,
  input  fft_adr_t adr_b,
  input  cplx_t    wdata_b,
  output cplx_t    rdata_b
);
  cplx_t mem [FFT_N];

  always_ff @(posedge clk) begin
    if (we_a) begin
      mem[adr_a] <= wdata_a;
      rdata_a    <= wdata_a;
    end else begin
      rdata_a    <= mem[adr_a];
    end
    if (we_b) begin
      mem[adr_b] <= wdata_b;
      rdata_b    <= wdata_b;
    end else begin
      rdata_b    <= mem[adr_b];
    end
  end
endmodule
