// sync_fifo: small synchronous first-in first-out queue, used for the RM
// FIFO, the KE FIFO and the Tag FIFO of every TCAM.
//
// A circular buffer of DEPTH units of type T with read and write pointers
// and an occupancy counter. The head unit is visible on `head` whenever
// `empty` is low (show-ahead), so a consumer can look at it and pop it in
// the same cycle. A push and a pop in the same cycle are both honoured,
// also when the queue is full. `count` is the occupancy, which the
// distributor uses as the backlog counter of full adaptation.
//
// Timing: a pushed unit is visible at the head one cycle after the push
// edge. Reset empties the queue (active-low, synchronous).
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       push,
  input  T                           din,
  input  logic                       pop,
  output T                           head,
  output logic                       empty,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                           mem [DEPTH];
  logic [AW-1:0]              wr_ptr, rd_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;
  logic                       do_push, do_pop;

  assign empty   = (cnt == 0);
  assign full    = (cnt == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign count   = cnt;
  assign head    = mem[rd_ptr];
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  function automatic logic [AW-1:0] nxt(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (do_push) wr_ptr <= nxt(wr_ptr);
      if (do_pop)  rd_ptr <= nxt(rd_ptr);
      case ({do_push, do_pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A producer must not push into a full queue unless it pops too, and a
  // consumer must not pop an empty one.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (!full || pop));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> !empty);

endmodule
