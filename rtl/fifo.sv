// fifo: the buffer on an arc of the processor's own dataflow graph.
//
// Every module of the processor takes its input through one of these. It is a
// show-ahead FIFO: rd_valid/rd_data present the oldest entry (a "Maybe"
// value: rd_valid low means no token), and the consumer pulses rd in the cycle
// it takes that entry. full tells the producer to send nothing; this is the
// back pressure of the design. A write and a read may happen in the same
// cycle, also when the FIFO is full (the read frees the slot the write uses
// at the clock edge, but full is still high that cycle, so a well-behaved
// producer will not write then).
//
// Timing: a word written at edge n is visible on rd_data after edge n
// (one-cycle latency), full is registered state of the count.
//
// The read/full/Maybe interface follows the design; the depth, the
// ring-buffer structure and the synchronous reset are this implementation's
// choices.
module fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst,
  // write side
  input  logic wr_valid,
  input  T     wr_data,
  output logic full,
  // read side
  output logic rd_valid,
  output T     rd_data,
  input  logic rd
);

  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                 mem [DEPTH];
  logic [PTR_W-1:0] wptr, rptr;
  logic [PTR_W:0]   count;

  logic do_wr, do_rd;

  assign rd_valid = (count != '0);
  assign full     = (count == (PTR_W+1)'(DEPTH));
  assign rd_data  = mem[rptr];

  assign do_rd = rd && rd_valid;
  assign do_wr = wr_valid && (!full || do_rd);

  function automatic logic [PTR_W-1:0] incr(input logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (do_wr) wptr <= incr(wptr);
      if (do_rd) rptr <= incr(rptr);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr] <= wr_data;
  end

  // The producer must honour full; a dropped token would break the program.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst)
                                  !(wr_valid && full && !do_rd))
    else $error("fifo: write while full");

endmodule
