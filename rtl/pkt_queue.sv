// pkt_queue: router packet queue with CRC-based queue control.
//
// An intermediate node stores each incoming image packet here and forwards
// it only if its CRC-8 was correct; a corrupted packet is discarded before
// it costs another hop. The queue holds NPKT packets of up to NMAX bytes.
// Input bytes come from msg_rx's image-packet stream: in_first marks the
// packet's first stored byte (its type byte, 0xAA), in_last its CRC byte,
// with in_good giving the CRC verdict. Bytes are written at a tentative
// pointer; on in_last a good packet is committed by moving the write pointer,
// a bad one is dropped by leaving it where it was. A packet that starts with
// less than NMAX free bytes is dropped as well. Committed packets leave on
// the out stream (valid/ready) with the leading sync byte 0xAA, which msg_rx
// consumed, put back in front, so out carries the whole IMAGE PACKET message;
// out_last marks its CRC byte. The drop-bad-packets rule and the two-packet
// size follow the protocol's queue control; the storage scheme is this
// design's.
module pkt_queue #(
  parameter int unsigned NPKT = 2,
  parameter int unsigned NMAX = 261
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [7:0]  in_byte,
  input  logic        in_first,
  input  logic        in_last,
  input  logic        in_good,
  output logic        out_valid,
  input  logic        out_ready,
  output logic [7:0]  out_byte,
  output logic        out_last,
  output logic [1:0]  level,         // whole packets waiting (saturates at 3)
  output logic [15:0] committed,
  output logic [15:0] dropped
);
  localparam int unsigned DEPTH = NPKT * NMAX + 1;  // one spare: full != empty
  localparam int unsigned PW    = $clog2(DEPTH + 1);

  typedef struct packed {
    logic       first;
    logic       last;
    logic [7:0] b;
  } qent_t;

  qent_t       mem [DEPTH];
  logic [PW-1:0] wp, wtmp, rp;
  logic [PW:0]   used;         // committed bytes waiting, plus bytes in flight
  logic        accepting;
  logic        pre_sent;       // leading 0xAA of the head packet already sent
  logic [15:0] pkts_out;

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  // Bytes from rp to wtmp (everything stored, committed or tentative).
  logic [PW:0] fill;
  always_comb begin
    if (wtmp >= rp) fill = (PW+1)'(wtmp - rp);
    else            fill = (PW+1)'(DEPTH) - (PW+1)'(rp - wtmp);
  end
  assign used = fill;

  logic head_first;
  always_comb begin
    head_first = mem[rp].first;
    out_valid  = (rp != wp);
    out_byte   = (head_first && !pre_sent) ? 8'hAA : mem[rp].b;
    out_last   = mem[rp].last && !(head_first && !pre_sent);
  end

  logic wr;
  assign wr = in_valid && (in_first ? ((PW+1)'(DEPTH) - used > (PW+1)'(NMAX)) : accepting);

  always_ff @(posedge clk) begin
    if (wr) mem[in_first ? wp : wtmp] <= '{first: in_first, last: in_last, b: in_byte};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      wtmp      <= '0;
      rp        <= '0;
      accepting <= 1'b0;
      pre_sent  <= 1'b0;
      committed <= '0;
      dropped   <= '0;
      pkts_out  <= '0;
    end else begin
      if (in_valid && in_first) begin
        if (wr) begin
          accepting <= 1'b1;
          wtmp      <= inc(wp);
        end else begin
          accepting <= 1'b0;
          wtmp      <= wp;
          dropped   <= dropped + 16'd1;
        end
      end else if (in_valid && accepting) begin
        if (in_last) begin
          accepting <= 1'b0;
          if (in_good) begin
            wp        <= inc(wtmp);
            wtmp      <= inc(wtmp);
            committed <= committed + 16'd1;
          end else begin
            wtmp      <= wp;
            dropped   <= dropped + 16'd1;
          end
        end else begin
          wtmp <= inc(wtmp);
        end
      end
      // output side
      if (out_valid && out_ready) begin
        if (head_first && !pre_sent) begin
          pre_sent <= 1'b1;
        end else begin
          rp       <= inc(rp);
          pre_sent <= 1'b0;
          if (mem[rp].last) pkts_out <= pkts_out + 16'd1;
        end
      end
    end
  end

  always_comb begin
    if (committed - pkts_out > 16'd3) level = 2'd3;
    else                              level = 2'(committed - pkts_out);
  end

endmodule
