// crc16: CRC16 check sum over the 32-bit words of one data block, for the
// main trailer (bits 31-16).
//
// The check sum is a CRC16; its polynomial, start value and bit order are
// this design's choice: CCITT polynomial x^16 + x^12 + x^5 + 1 (0x1021),
// start value 0xFFFF, each word taken most significant bit first, no final
// inversion. Each clock with en folds one 32-bit word into the register;
// init restarts at 0xFFFF (init wins over en). crc shows the value over all
// words folded since the last init.
module crc16 (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        init,
  input  logic        en,
  input  logic [31:0] data,
  output logic [15:0] crc
);
  function automatic logic [15:0] crc_next(logic [15:0] c, logic [31:0] d);
    logic [15:0] r;
    logic        fb;
    r = c;
    for (int k = 31; k >= 0; k--) begin
      fb = r[15] ^ d[k];
      r  = {r[14:0], 1'b0} ^ (fb ? 16'h1021 : 16'h0000);
    end
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= 16'hFFFF;
    else if (init)  crc <= 16'hFFFF;
    else if (en)    crc <= crc_next(crc, data);
  end
endmodule
