// sync2: two-flip-flop synchroniser for a level signal entering the clk
// domain. Output follows the input two to three clk edges later. The reset
// value is RST_VAL. Both flops power up at the opposite level, so that the
// first reset makes a clean edge on q; used as a reset synchroniser
// (d tied high, RST_VAL 0) its q is then a proper asynchronous reset for
// the flops it drives, asserted at once and released on a clk edge.
module sync2 #(
  parameter bit RST_VAL = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q = !RST_VAL
);
  logic meta = !RST_VAL;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= RST_VAL;
      q    <= RST_VAL;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
