// program_memory: the dataflow program, one instruction per graph node.
//
// Entry n holds the operation of node n (add, subtract or multiply) and up to
// four destinations, each with a valid bit. The matcher reads the entry of the
// node that fires, addressed by node number, in the same cycle (asynchronous
// read). The memory does not change while a program runs; it is loaded
// beforehand through the write port (we/wr_addr/wr_instr, one entry per clock
// edge).
//
// The 128 entries, the contents and the read style follow the design. The
// write port is this implementation's choice, since the design does not say
// how the program gets in. Contents are not reset.
module program_memory
  import dfp_pkg::*;
#(
  parameter int unsigned NODES = dfp_pkg::NUM_NODES,
  localparam int unsigned AW   = $clog2(NODES)
) (
  input  logic          clk,
  input  logic [AW-1:0] rd_addr,
  output instr_t        rd_instr,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  instr_t        wr_instr
);

  instr_t mem [NODES];

  assign rd_instr = mem[rd_addr];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_instr;
  end

endmodule
