// ext_ram_if: external RAM interface.
//
// Makes two 256Kx16 asynchronous SRAMs look like one synchronous 512Kx16 RAM
// to the processing system, with a separate read port and write port, each a
// request/acknowledge pair clocked by hclock. Address bit 18 picks the device
// (0: RAM 1, 1: RAM 2); bits 17:0 go to the address bus both devices share,
// as do WE and OE. Each device has its own chip enable, byte enables and data
// bus. The port and pin names follow the interface drawing of the original
// design; the timing and the active-low pin polarity are this design's own.
//
// Timing (one access at a time, a read wins over a write raised in the same
// idle cycle):
//   read : cycle 0 request seen -> cycle 1 CE/OE low, address driven ->
//          Read_data registered and Read_ack high for one cycle in cycle 2.
//   write: cycle 1 CE/WE low with address and data driven -> cycle 2 WE
//          high, data still driven -> Write_ack high for one cycle in
//          cycle 3.
// A request must be held until its acknowledge and may be changed or dropped
// in the acknowledge cycle; a new request is taken the cycle after, so a read
// occupies the interface for 3 cycles and a write for 4. Every access is a full word,
// so UB and LB of the selected device follow its CE. The data buses are split
// into out / in / output-enable; the tristate driver is in the pad.
module ext_ram_if (
  input  logic        hclock,
  input  logic        rst_n,
  // write port
  input  logic [18:0] Write_address,
  input  logic        Write_enable,
  output logic        Write_ack,
  input  logic [15:0] Write_data,
  // read port
  input  logic [18:0] Read_address,
  input  logic        Read_enable,
  output logic        Read_ack,
  output logic [15:0] Read_data,
  // SRAM pins (active low controls)
  output logic [17:0] A,
  output logic [15:0] IO1_o,
  input  logic [15:0] IO1_i,
  output logic        IO1_oe,
  output logic [15:0] IO2_o,
  input  logic [15:0] IO2_i,
  output logic        IO2_oe,
  output logic        CE1,
  output logic        UB1,
  output logic        LB1,
  output logic        CE2,
  output logic        UB2,
  output logic        LB2,
  output logic        WE,
  output logic        OE
);

  typedef enum logic [1:0] {S_IDLE, S_RD, S_WR, S_WR_HOLD} state_e;
  state_e      state;
  logic [18:0] addr_q;
  logic [15:0] wdata_q;

  always_ff @(posedge hclock or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      addr_q    <= '0;
      wdata_q   <= '0;
      Read_ack  <= 1'b0;
      Write_ack <= 1'b0;
      Read_data <= '0;
    end else begin
      Read_ack  <= 1'b0;
      Write_ack <= 1'b0;
      unique case (state)
        S_IDLE: begin
          // The cycle that shows an ack is the requester's turn to move on,
          // so no new request is taken in it.
          if (Read_ack || Write_ack) begin
            state <= S_IDLE;
          end else if (Read_enable) begin
            addr_q <= Read_address;
            state  <= S_RD;
          end else if (Write_enable) begin
            addr_q  <= Write_address;
            wdata_q <= Write_data;
            state   <= S_WR;
          end
        end
        S_RD: begin
          Read_data <= addr_q[18] ? IO2_i : IO1_i;
          Read_ack  <= 1'b1;
          state     <= S_IDLE;
        end
        S_WR: state <= S_WR_HOLD;
        S_WR_HOLD: begin
          Write_ack <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Pin drive, decoded from the registered state (glitch-free strobes).
  logic sel1, sel2, active, writing;
  always_comb begin
    active  = (state != S_IDLE);
    writing = (state == S_WR) || (state == S_WR_HOLD);
    sel1    = active && !addr_q[18];
    sel2    = active &&  addr_q[18];
    A       = addr_q[17:0];
    CE1     = !sel1;
    UB1     = !sel1;
    LB1     = !sel1;
    CE2     = !sel2;
    UB2     = !sel2;
    LB2     = !sel2;
    WE      = !(state == S_WR);
    OE      = !(state == S_RD);
    IO1_o   = wdata_q;
    IO2_o   = wdata_q;
    IO1_oe  = writing && sel1;
    IO2_oe  = writing && sel2;
  end

  // A request is held until acknowledged.
  property p_rd_held;
    @(posedge hclock) disable iff (!rst_n) (state == S_RD) |-> Read_enable;
  endproperty
  assert property (p_rd_held);

endmodule
