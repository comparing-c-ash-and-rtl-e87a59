// tb_program_memory: loads all 128 entries with random instructions (among
// them the five nodes of the example graph at nodes 0..4), then reads every
// entry back through the asynchronous read port and compares.
module tb_program_memory;
  import dfp_pkg::*;
  logic clk = 0;
  logic [6:0] rd_addr, wr_addr;
  instr_t rd_instr, wr_instr;
  logic we;
  instr_t model[NUM_NODES];
  int checks = 0, failures = 0;

  program_memory dut (.*);

  always #5 clk = ~clk;

  function automatic mdest_t md(input dest_t d);
    return '{valid: 1'b1, dest: d};
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; rd_addr = 0; wr_addr = 0; wr_instr = '0;
    for (int i = 0; i < NUM_NODES; i++) begin
      model[i].op = op_t'($urandom_range(0, 2));
      for (int d = 0; d < MAX_DEST; d++) model[i].dests[d] = mdest_t'($urandom);
    end
    // Example graph program
    model[0] = '{op: OP_ADD, dests: '{'0, '0, md(mk_dest(3, SIDE_L)), md(mk_dest(2, SIDE_L))}};
    model[4] = '{op: OP_MUL, dests: '{'0, '0, '0, md(mk_out(0))}};
    for (int i = 0; i < NUM_NODES; i++) begin
      @(negedge clk);
      we = 1; wr_addr = 7'(i); wr_instr = model[i];
    end
    @(negedge clk); we = 0;
    for (int i = NUM_NODES - 1; i >= 0; i--) begin
      rd_addr = 7'(i); #1;
      checks++;
      if (rd_instr != model[i]) begin failures++; $display("FAIL entry %0d", i); end
    end
    // write enable low must not change contents
    @(negedge clk); wr_addr = 0; wr_instr = ~model[0]; @(posedge clk); #1;
    rd_addr = 0; #1; checks++; if (rd_instr != model[0]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
