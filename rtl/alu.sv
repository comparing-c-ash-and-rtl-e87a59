// alu: computes a fired node and sends the result to each of its destinations.
//
// Extended tokens from the matcher wait in the ALU's input FIFO. The function
// unit works combinationally on the head entry. A two-bit pointer cd (the ALU
// state) selects the destination being served. Each cycle:
//   1. out_full is high: nothing is sent, nothing is read, cd is kept.
//   2. otherwise, a head entry is present: the result goes out with
//      destination d[cd]. If d[cd+1] exists and is valid, cd advances;
//      otherwise cd returns to 0 and the FIFO entry is consumed.
//   3. otherwise (no entry): nothing is sent and cd returns to 0.
// So a node with k destinations occupies the ALU for k cycles and emits k
// tokens with the same value, one per cycle. An entry whose first destination
// is invalid is consumed without output.
//
// Interface: in_valid/in_ex/in_full is the write side of the input FIFO;
// out_valid/out_token feed the router's internal FIFO, whose full line is
// out_full. The output is combinational from the FIFO head and cd.
//
// The three cases, the destination pointer and the single-cycle unpipelined
// computation follow the design. Destinations are taken to be packed from d1
// upward (the pointer stops at the first invalid one), as the design's
// destination count suggests.
module alu
  import dfp_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     in_valid,
  input  extoken_t in_ex,
  output logic     in_full,
  output logic     out_valid,
  output token_t   out_token,
  input  logic     out_full,
  // status, for observation
  output logic     multi_dest,
  output logic     stalled
);

  localparam int unsigned CD_W = $clog2(MAX_DEST);

  logic     hd_valid, hd_read;
  extoken_t hd;
  word_t    res;

  logic [CD_W-1:0] cd, cd_next;
  logic            more;

  fifo #(.T(extoken_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst,
    .wr_valid (in_valid), .wr_data (in_ex), .full (in_full),
    .rd_valid (hd_valid), .rd_data (hd),    .rd   (hd_read)
  );

  function_unit u_fu (.op (hd.op), .a (hd.op1), .b (hd.op2), .y (res));

  always_comb begin
    more      = (cd != CD_W'(MAX_DEST - 1)) && hd.dests[cd + 1'b1].valid;
    out_token = '{value: res, dest: hd.dests[cd].dest};
    out_valid = 1'b0;
    hd_read   = 1'b0;
    cd_next   = cd;
    if (out_full) begin
      cd_next = cd;
    end else if (hd_valid) begin
      out_valid = hd.dests[cd].valid;
      if (more) begin
        cd_next = cd + 1'b1;
      end else begin
        cd_next = '0;
        hd_read = 1'b1;
      end
    end else begin
      cd_next = '0;
    end
  end

  assign multi_dest = out_valid && (cd != '0);
  assign stalled    = out_full && hd_valid;

  always_ff @(posedge clk) begin
    if (rst) cd <= '0;
    else     cd <= cd_next;
  end

endmodule
