// crc8: byte-wide CRC-8 generator/checker for the application-layer image
// packets. Polynomial POLY (default x^8 + x^2 + x + 1, 0x07), initial value
// 0, bits taken most significant first, no final inversion; the original
// protocol only says "CRC-8", so these settings are this design's choice.
// clear resets the register; each cycle with en folds din in. crc shows the
// CRC of all bytes folded since the last clear. Running the received CRC
// byte through as well leaves crc = 0 for an error-free packet.
module crc8 #(
  parameter logic [7:0] POLY = 8'h07
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       clear,
  input  logic       en,
  input  logic [7:0] din,
  output logic [7:0] crc
);
  function automatic logic [7:0] next_crc(logic [7:0] c, logic [7:0] d);
    logic [7:0] r;
    r = c ^ d;
    for (int i = 0; i < 8; i++) r = r[7] ? ((r << 1) ^ POLY) : (r << 1);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     crc <= '0;
    else if (clear) crc <= '0;
    else if (en)    crc <= next_crc(crc, din);
  end
endmodule
