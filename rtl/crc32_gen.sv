// crc32_gen -- running CRC-32 over a stream of 32-bit words.
//
// Generator x^32+x^26+x^23+x^22+x^16+x^12+x^11+x^10+x^8+x^7+x^5+x^4+x^2+x+1
// (0x04C11DB7). Each valid word is fed MSB first through the bit-serial
// division in one clock (the loop unrolls to XOR logic). The register
// starts at FFFFFFFF on reset or `init`, is not reflected and is not
// inverted at the end; `dout` is the remainder after the words so far and
// `dout_vld` marks the cycle after a word was taken. These conventions
// reproduce the chip's CRC simulation (87654321 -> 99AB297E from the start
// value). The data channel appends the final `dout` to each frame.
module crc32_gen #(
  parameter logic [31:0] POLY = metpc_pkg::CRC32_POLY,
  parameter logic [31:0] INIT = metpc_pkg::CRC32_INIT
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        din_vld,
  input  logic [31:0] din,
  output logic [31:0] dout,
  output logic        dout_vld
);
  function automatic logic [31:0] crc_step(logic [31:0] c, logic [31:0] d);
    logic [31:0] r;
    r = c;
    for (int i = 31; i >= 0; i--)
      r = {r[30:0], 1'b0} ^ ((r[31] ^ d[i]) ? POLY : 32'h0);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout     <= INIT;
      dout_vld <= 1'b0;
    end else if (init) begin
      dout     <= INIT;
      dout_vld <= 1'b0;
    end else begin
      dout_vld <= din_vld;
      if (din_vld) dout <= crc_step(dout, din);
    end
  end
endmodule
