// sram_256kx16_model: behavioural model of a 256Kx16 asynchronous SRAM
// (not synthesizable intent; testbench use only). Active-low CE, OE, WE, UB,
// LB. Writes happen while CE and WE are low; a read returns the addressed
// word combinationally while CE and OE are low and WE is high. The
// bidirectional bus is split into io_i (driven by the controller) and io_o.
module sram_256kx16_model (
  input  logic [17:0] A,
  input  logic [15:0] io_i,
  output logic [15:0] io_o,
  input  logic        CE,
  input  logic        UB,
  input  logic        LB,
  input  logic        WE,
  input  logic        OE
);
  logic [15:0] mem [0:262143];

  always_comb begin
    io_o = 16'h0000;
    if (!CE && !OE && WE) io_o = mem[A];
  end

  always @(CE or WE or A or io_i or UB or LB) begin
    if (!CE && !WE) begin
      if (!UB) mem[A][15:8] = io_i[15:8];
      if (!LB) mem[A][7:0]  = io_i[7:0];
    end
  end
endmodule
