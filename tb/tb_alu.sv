// tb_alu: checks the ALU's computation and its destination sequencing.
//
// Extended tokens with random opcode, operands and one to four packed
// destinations are sent in. The expected output is worked out in the
// testbench: one token per valid destination, in order d1..d4, each carrying
// the 16-bit result. Phase 1 keeps out_full low and checks the rate: a node
// with k destinations takes exactly k cycles, so a back-to-back burst of
// nodes produces one token every cycle. Phase 2 toggles out_full at random
// and adds entries with no valid destination; it checks that nothing is sent
// while out_full is high and that the sequence is unchanged.
module tb_alu;
  import dfp_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_full, out_valid, out_full, multi_dest, stalled;
  extoken_t in_ex;
  token_t out_token;
  int checks = 0, failures = 0;

  alu dut (.*);

  always #5 clk = ~clk;

  token_t expect_q[$];
  int n_out = 0, first_out = -1, last_out = -1, cyc = 0, n_multi = 0, n_stall = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t calc(op_t o, word_t a, word_t b);
    int r;
    case (o)
      OP_ADD:  r = int'(a) + int'(b);
      OP_SUB:  r = int'(a) - int'(b);
      default: r = int'(a) * int'(b);
    endcase
    return word_t'(r);
  endfunction

  // Random extended token with k packed destinations; k = 0 gives none.
  function automatic extoken_t gen(int k);
    extoken_t e;
    e.op1 = word_t'($urandom); e.op2 = word_t'($urandom);
    e.op = op_t'($urandom_range(0, 2));
    for (int d = 0; d < MAX_DEST; d++) begin
      e.dests[d].valid = (d < k);
      e.dests[d].dest  = dest_t'($urandom);
    end
    for (int d = 0; d < k; d++)
      expect_q.push_back('{value: calc(e.op, e.op1, e.op2), dest: e.dests[d].dest});
    return e;
  endfunction

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) begin
    #4;
    if (!rst) begin
      if (out_valid) begin
        automatic token_t t;
        check(!out_full, "no send while full");
        if (first_out < 0) first_out = cyc;
        last_out = cyc;
        n_out++;
        if (expect_q.size() == 0) check(0, "unexpected token");
        else begin
          t = expect_q.pop_front();
          check(out_token == t, "token contents");
        end
      end
      if (multi_dest) n_multi++;
      if (stalled) n_stall++;
    end
  end

  task automatic push(extoken_t e);
    @(negedge clk);
    while (in_full) @(negedge clk);
    in_valid = 1; in_ex = e;
    @(negedge clk);
    in_valid = 0;
  endtask

  initial begin
    automatic int total = 0;
    automatic int k;
    in_valid = 0; in_ex = '0; out_full = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    // Phase 1: back-to-back, never full downstream. Writes go in every cycle
    // the FIFO has room.
    for (int i = 0; i < 40; i++) begin
      k = $urandom_range(1, 4);
      total += k;
      @(negedge clk);
      while (in_full) begin in_valid = 0; @(negedge clk); end
      in_valid = 1; in_ex = gen(k);
    end
    @(negedge clk); in_valid = 0;
    repeat (200) @(negedge clk);
    check(expect_q.size() == 0, "phase 1 all tokens out");
    check(n_out == total, "phase 1 token count");
    check(last_out - first_out + 1 == total, "phase 1 one token per cycle");
    $display("alu phase 1: %0d tokens in %0d cycles", total, last_out - first_out + 1);
    // Phase 2: random back pressure, some entries with no destination.
    fork
      begin
        for (int i = 0; i < 300; i++) push(gen($urandom_range(0, 9) == 0 ? 0 : $urandom_range(1, 4)));
      end
      begin
        for (int i = 0; i < 3000; i++) begin
          @(negedge clk); out_full = ($urandom_range(0, 99) < 40);
        end
        out_full = 0;
      end
    join
    repeat (50) @(negedge clk);
    check(expect_q.size() == 0, "phase 2 all tokens out");
    check(n_multi > 0, "multi-destination node seen");
    check(n_stall > 0, "output stall seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
