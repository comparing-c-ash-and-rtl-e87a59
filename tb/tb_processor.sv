// tb_processor: end-to-end test of the dataflow processor at its default
// size (128 nodes, FIFO depth 4).
//
// Each program is loaded through the program port, its input tokens are
// pushed into the external input as fast as in_full allows, and tokens
// leaving on out_* are checked against the reference values of
// tb_graph_pkg: every expected output exactly once, nothing else. out_full
// is driven at random, with long blocked stretches, so that back pressure
// travels all the way round the ring. Programs: the five-node example
// (-135), the four-point FFT on several input sets, and random graphs up to
// the full 128 nodes.
//
// The test counts each mechanism of the design and fails if one never
// happens: internal tokens taking priority over waiting external ones, a
// token stored in the token store, a node firing, the matcher waiting for the
// ALU FIFO, a node sending to several destinations, the external input
// pushing back (in_full) and the outside pushing back (out_full while a
// result waits). The ALU waiting for the router cannot happen at the default
// size, whose internal router FIFO holds every live token of a program; it is
// only reported here, and tb_processor_bp provokes it with a small FIFO.
module tb_processor;
  import dfp_pkg::*;
  import tb_graph_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_full, out_valid, out_full, prog_we;
  token_t in_token, out_token;
  logic [6:0] prog_addr;
  instr_t prog_data;
  logic st_int_over_ext, st_stored, st_fired, st_match_stall, st_multi_dest, st_alu_stall;
  int checks = 0, failures = 0;
  int n_prio = 0, n_store = 0, n_fire = 0, n_mstall = 0, n_multi = 0, n_astall = 0;
  int n_in_full = 0, n_out_block = 0;

  processor dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #4;
    if (!rst) begin
      n_prio   += int'(st_int_over_ext);
      n_store  += int'(st_stored);
      n_fire   += int'(st_fired);
      n_mstall += int'(st_match_stall);
      n_multi  += int'(st_multi_dest);
      n_astall += int'(st_alu_stall);
      if (out_full && !out_valid && dut.u_router.head_valid && dut.u_router.head.dest.to_out)
        n_out_block++;
    end
  end

  task automatic run(dfg g, int block_pct, int verbose);
    token_t ext_q[$];
    word_t  got[int];
    int     idle = 0, cycles = 0, blocked = 0, last_out = 0;
    ext_q = g.inputs;
    for (int i = 0; i < g.n; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 7'(i); prog_data = g.pm[i];
    end
    @(negedge clk); prog_we = 0;
    while (idle < 40) begin
      bit sent;
      @(negedge clk);
      cycles++;
      // out_full in stretches: start a blocked stretch now and then
      if (blocked > 0) blocked--;
      else if ($urandom_range(0, 99) < block_pct) blocked = $urandom_range(1, 25);
      out_full = (blocked > 0);
      sent = ext_q.size() != 0 && !in_full;
      if (ext_q.size() != 0 && in_full) n_in_full++;
      in_valid = sent;
      in_token = (ext_q.size() != 0) ? ext_q[0] : '0;
      #4;
      if (out_valid) begin
        automatic int tag = int'(out_token.dest.node);
        last_out = cycles;
        check(!out_full, "no output while full");
        check(out_token.dest.to_out, "only out tokens leave");
        check(g.expect_out.exists(tag) && !got.exists(tag), "expected, single output");
        if (g.expect_out.exists(tag))
          check(out_token.value == g.expect_out[tag], "output value");
        got[tag] = out_token.value;
      end
      @(posedge clk);
      if (sent) void'(ext_q.pop_front());
      idle = (out_valid || sent || ext_q.size() != 0 || dut.u_router.head_valid ||
              dut.u_core.u_matcher.hd_valid || dut.u_core.u_alu.hd_valid) ? 0 : idle + 1;
    end
    in_valid = 0;
    check(got.num() == g.expect_out.num(), "all outputs arrived");
    check(dut.u_core.u_matcher.u_tst.present == '0, "token store empty after the run");
    if (verbose != 0)
      $display("%s: %0d nodes, %0d inputs, %0d outputs, last output in cycle %0d",
               g.name, g.n, g.inputs.size(), got.num(), last_out);
    if (g.name == "example") begin
      $display("  out = %0d", got[0]);
      check(got[0] == -135, "example result -135");
    end
  endtask

  initial begin
    dfg g;
    automatic word_t xr[4] = '{100, -7, 33, 2000};
    automatic word_t xi[4] = '{5, 12, -300, 1};
    in_valid = 0; in_token = '0; out_full = 0; prog_we = 0; prog_addr = 0; prog_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    g = new("example"); g.example(); run(g, 0, 1);
    g = new("fft4");    g.fft4(xr, xi); run(g, 0, 1);
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < 4; k++) begin
        xr[k] = word_t'($urandom_range(0, 4000) - 2000);
        xi[k] = word_t'($urandom_range(0, 4000) - 2000);
      end
      g = new("fft4"); g.fft4(xr, xi); run(g, 10, 0);
    end
    $display("fft4: 20 more random input sets done");
    for (int r = 0; r < 8; r++) begin
      g = new($sformatf("random%0d", r));
      g.random_graph(r >= 6 ? NUM_NODES : 16 + 16 * r);
      run(g, (r % 2 != 0) ? 15 : 5, 1);
    end
    $display("events: int_over_ext=%0d store=%0d fire=%0d match_stall=%0d multi_dest=%0d",
             n_prio, n_store, n_fire, n_mstall, n_multi);
    $display("        alu_stall=%0d in_full=%0d out_blocked=%0d", n_astall, n_in_full, n_out_block);
    check(n_prio > 0,     "internal priority happened");
    check(n_store > 0,    "token stored");
    check(n_fire > 0,     "node fired");
    check(n_mstall > 0,   "matcher waited for ALU FIFO");
    check(n_multi > 0,    "multi-destination node");
    check(n_in_full > 0,  "input back pressure");
    check(n_out_block > 0, "output back pressure");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
