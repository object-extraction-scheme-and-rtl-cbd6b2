// power_ctrl: power control unit of the image processing block.
//
// The image processing block is inactive by default, its clock suppressed;
// its registers keep their contents while the clock is stopped, so a box
// found by one command is still there for the next. When the network processor raises a command
// (np_cmd_pending) the unit enables the clock (ip_clk_en) and waits until the
// enable has been seen in the high-frequency domain (en_ack, returned through
// a synchroniser); only then does it assert ip_ready, which lets the
// cross-domain message path deliver the command. When the image block's
// done status arrives (task_done, one lclk pulse) the clock is suppressed
// again. The inactive/active behaviour under network-processor control is
// the original design's; the wake handshake is this design's choice. Counters of wake-ups and active lclk cycles are kept for
// energy accounting by the network processor.
// All signals are in the lclk (low-frequency) domain.
module power_ctrl (
  input  logic        lclk,
  input  logic        rst_n,
  input  logic        np_cmd_pending,  // a command waits for the image block
  input  logic        task_done,       // done status received (pulse)
  input  logic        en_ack,          // ip_clk_en as seen by the hclk domain
  output logic        ip_clk_en,       // to the clock gate (via synchroniser)
  output logic        ip_ready,        // clock running, command may be sent
  output logic [15:0] wake_count,
  output logic [31:0] active_cycles
);
  typedef enum logic [1:0] {P_INACTIVE, P_WAKE, P_ACTIVE, P_SLEEP} pstate_e;
  pstate_e state;

  always_ff @(posedge lclk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= P_INACTIVE;
      wake_count    <= '0;
      active_cycles <= '0;
    end else begin
      if (state != P_INACTIVE) active_cycles <= active_cycles + 32'd1;
      unique case (state)
        P_INACTIVE: if (np_cmd_pending) begin
          state      <= P_WAKE;
          wake_count <= wake_count + 16'd1;
        end
        P_WAKE:   if (en_ack) state <= P_ACTIVE;
        P_ACTIVE: if (task_done) state <= P_SLEEP;
        P_SLEEP:  if (!en_ack) state <= P_INACTIVE;   // gate closed
        default:  state <= P_INACTIVE;
      endcase
    end
  end

  assign ip_clk_en = (state == P_WAKE) || (state == P_ACTIVE);
  assign ip_ready  = (state == P_ACTIVE);
endmodule
