// tb_matcher: checks the store-or-fire rule of the matcher.
//
// The program memory is loaded with random instructions. A stream of tokens
// is generated that obeys the static dataflow rule (per node, one left and one
// right token before it fires), in random order over all 128 nodes, while the
// ALU side's full line toggles at random. The expected extended tokens are
// worked out from the token stream alone: the second token of a node produces
// (left value, right value, opcode, destinations of that node). The test
// compares every extended token in order, checks that none is emitted while
// ex_full is high, that one token is handled per cycle when nothing blocks,
// and that stalls happened.
module tb_matcher;
  import dfp_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_full, ex_valid, ex_full, prog_we, stored, fired, stalled;
  token_t in_token;
  extoken_t ex_token;
  logic [6:0] prog_addr;
  instr_t prog_data;
  int checks = 0, failures = 0;

  matcher dut (.*);

  always #5 clk = ~clk;

  instr_t   pm[NUM_NODES];
  token_t   stream[$];
  extoken_t expect_q[$];
  bit       has[NUM_NODES][2];
  int       n_stall = 0, n_store = 0, n_fire = 0;
  localparam int NTOK = 800;

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

  // Build the stream and its expected results independently of the DUT.
  initial begin : build
    automatic word_t held[NUM_NODES];
    for (int i = 0; i < NUM_NODES; i++) begin
      pm[i].op = op_t'($urandom_range(0, 2));
      for (int d = 0; d < MAX_DEST; d++) pm[i].dests[d] = mdest_t'($urandom);
    end
    for (int k = 0; k < NTOK; k++) begin
      automatic token_t t;
      automatic int n = $urandom_range(0, NUM_NODES - 1);
      automatic side_t s = side_t'($urandom_range(0, 1));
      if (has[n][s]) s = side_t'(!s);
      t.value = word_t'($urandom);
      t.dest  = mk_dest(node_t'(n), s);
      stream.push_back(t);
      if (has[n][!s]) begin
        automatic extoken_t e;
        e.op1 = (s == SIDE_L) ? t.value : held[n];
        e.op2 = (s == SIDE_L) ? held[n] : t.value;
        e.op = pm[n].op; e.dests = pm[n].dests;
        expect_q.push_back(e);
        has[n][!s] = 0;
      end else begin
        held[n] = t.value;
        has[n][s] = 1;
      end
    end
  end

  // Output monitor, just before each rising edge.
  always @(negedge clk) begin
    #4;
    if (!rst) begin
      if (ex_valid) begin
        check(!ex_full, "no send while full");
        if (expect_q.size() == 0) check(0, "unexpected extoken");
        else begin
          automatic extoken_t e = expect_q.pop_front();
          check(ex_token == e, "extoken contents");
          if (ex_token != e) $display("  got %h exp %h", ex_token, e);
        end
      end
      if (stalled) n_stall++;
      if (stored) n_store++;
      if (fired) n_fire++;
    end
  end

  initial begin
    automatic int sent = 0, t0 = 0;
    in_valid = 0; in_token = '0; ex_full = 0; prog_we = 0; prog_addr = 0; prog_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int i = 0; i < NUM_NODES; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 7'(i); prog_data = pm[i];
    end
    @(negedge clk); prog_we = 0;
    // Throughput: with ex_full low, tokens stream at one per cycle.
    t0 = 0;
    while (stream.size() != 0) begin
      @(negedge clk);
      in_valid = 0;
      ex_full = (sent > 100) && ($urandom_range(0, 99) < 35);
      if (!in_full) begin
        in_valid = 1; in_token = stream.pop_front(); sent++;
      end else if (sent <= 100) t0++;
    end
    @(negedge clk); in_valid = 0; ex_full = 0;
    check(t0 == 0, "one token per cycle while the ALU side is free (input never full)");
    repeat (20) @(negedge clk);
    check(expect_q.size() == 0, "all extokens seen");
    check(n_stall > 0, "stall happened");
    check(n_store + n_fire == NTOK, "every token handled once");
    $display("matcher: stores=%0d fires=%0d stalls=%0d", n_store, n_fire, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
