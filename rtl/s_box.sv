// s_box - status box of one packet buffer.
//
// Each input and output buffer of a Node keeps its packets in SLOTS slots used
// as a ring. The S-box holds the buffer status: the slot the producer writes
// next, the slot the consumer reads next and the number of full slots. From
// these it raises wr_free (a slot can take a new packet) and rd_avail (a full
// packet is waiting). Writing to a full buffer and reading an empty one are
// blocking: the producer may commit only while wr_free is high and the
// consumer may release only while rd_avail is high; assertions check this.
//
// Timing: commit and release are single-cycle strobes and may come in the
// same cycle; the status they cause is visible from the next cycle. Reset is
// active low and synchronous-to-clock (asynchronous assert), emptying the
// buffer.
//
// The platform gives the S-box the status and arbitration of the buffer and
// the crossing between clock domains. Here both sides run on one clock and
// each buffer side has a single user, so no arbitration or clock-domain
// crossing logic is needed; this is the design's own simplification.
module s_box #(
  parameter int unsigned SLOTS = 2
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             commit,    // producer finished a packet
  input  logic                             release_i, // consumer finished a packet
  output logic [$clog2(SLOTS)-1:0]         wr_slot,   // slot being written
  output logic [$clog2(SLOTS)-1:0]         rd_slot,   // slot being read
  output logic [$clog2(SLOTS+1)-1:0]       count,     // full slots
  output logic                             wr_free,
  output logic                             rd_avail
);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned CW = $clog2(SLOTS + 1);

  function automatic logic [SW-1:0] next_slot(input logic [SW-1:0] s);
    return (s == SW'(SLOTS - 1)) ? '0 : s + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_slot <= '0;
      rd_slot <= '0;
      count   <= '0;
    end else begin
      if (commit)    wr_slot <= next_slot(wr_slot);
      if (release_i) rd_slot <= next_slot(rd_slot);
      case ({commit, release_i})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  assign wr_free  = (count != CW'(SLOTS));
  assign rd_avail = (count != '0);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) commit |-> wr_free)
    else $error("s_box: packet committed to a full buffer");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) release_i |-> rd_avail)
    else $error("s_box: packet released from an empty buffer");

endmodule
