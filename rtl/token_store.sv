// token_store: the explicit token store (ETS) of the matcher.
//
// One slot per graph node, addressed by node number. A slot holds one data
// word and a presence bit that says whether a token is waiting there. Only the
// value is kept: the destination of a waiting token is implied by the slot it
// sits in and by the side of the token that later matches it.
//
// Interface: rd_addr selects a slot, rd_present/rd_value show it in the same
// cycle (asynchronous read). wr_en stores wr_value at wr_addr and sets its
// presence bit; clr_en clears the presence bit at clr_addr. Both take effect
// at the next clock edge. A write and a clear of the same slot in one cycle
// leave the slot occupied.
//
// Synchronous write with asynchronous read, and the separate presence-bit
// array, follow the design. Reset clears all presence bits (the values are
// not reset); that is this implementation's choice.
module token_store
  import dfp_pkg::*;
#(
  parameter int unsigned NODES  = dfp_pkg::NUM_NODES,
  parameter int unsigned VALUE_W = dfp_pkg::WORD_W,
  localparam int unsigned AW    = $clog2(NODES)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [AW-1:0]     rd_addr,
  output logic              rd_present,
  output logic [VALUE_W-1:0] rd_value,
  input  logic              wr_en,
  input  logic [AW-1:0]     wr_addr,
  input  logic [VALUE_W-1:0] wr_value,
  input  logic              clr_en,
  input  logic [AW-1:0]     clr_addr
);

  logic [VALUE_W-1:0] value   [NODES];
  logic [NODES-1:0]  present;

  assign rd_present = present[rd_addr];
  assign rd_value   = value[rd_addr];

  always_ff @(posedge clk) begin
    if (wr_en) value[wr_addr] <= wr_value;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      present <= '0;
    end else begin
      if (clr_en) present[clr_addr] <= 1'b0;
      if (wr_en)  present[wr_addr]  <= 1'b1;
    end
  end

endmodule
