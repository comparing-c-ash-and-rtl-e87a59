// tb_core: runs whole dataflow programs on the matcher + ALU pair.
//
// The testbench plays the router: it feeds the core's input with the result
// tokens the core sends back (first) and the program's input tokens, and
// collects tokens marked for the output. The core's out_full is driven at
// random so that the ALU has to wait. Programs: the five-node example
// (result -135), a four-point FFT, and random graphs. Every expected output
// must arrive exactly once with the reference value and nothing else may
// come out; afterwards the token store must be empty again, which the next
// program relies on.
module tb_core;
  import dfp_pkg::*;
  import tb_graph_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid, in_full, out_valid, out_full, prog_we;
  token_t in_token, out_token;
  logic [6:0] prog_addr;
  instr_t prog_data;
  logic m_stored, m_fired, m_stalled, a_multi_dest, a_stalled;
  int checks = 0, failures = 0;
  int n_fire = 0, n_store = 0, n_mstall = 0, n_multi = 0, n_astall = 0;

  core dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) begin
    #4;
    if (!rst) begin
      n_fire += int'(m_fired); n_store += int'(m_stored); n_mstall += int'(m_stalled);
      n_multi += int'(a_multi_dest); n_astall += int'(a_stalled);
    end
  end

  task automatic run(dfg g, int full_pct);
    token_t ext_q[$], int_q[$];
    word_t  got[int];
    int     idle = 0, cycles = 0;
    ext_q = g.inputs;
    for (int i = 0; i < g.n; i++) begin
      @(negedge clk); prog_we = 1; prog_addr = 7'(i); prog_data = g.pm[i];
    end
    @(negedge clk); prog_we = 0;
    while (idle < 30) begin
      bit from_int, sent;
      @(negedge clk);
      cycles++;
      out_full = ($urandom_range(0, 99) < full_pct);
      from_int = (int_q.size() != 0);
      sent = !in_full && (from_int || ext_q.size() != 0);
      in_valid = sent;
      in_token = from_int ? int_q[0] : (ext_q.size() != 0 ? ext_q[0] : '0);
      #4;
      if (out_valid) begin
        check(!out_full, "no output while full");
        if (out_token.dest.to_out) begin
          automatic int tag = int'(out_token.dest.node);
          check(g.expect_out.exists(tag) && !got.exists(tag), "expected, single output");
          if (g.expect_out.exists(tag))
            check(out_token.value == g.expect_out[tag], "output value");
          got[tag] = out_token.value;
        end
      end
      @(posedge clk);
      if (sent) begin
        if (from_int) void'(int_q.pop_front()); else void'(ext_q.pop_front());
      end
      if (out_valid && !out_token.dest.to_out) int_q.push_back(out_token);
      idle = (out_valid || sent || ext_q.size() != 0 || int_q.size() != 0) ? 0 : idle + 1;
    end
    in_valid = 0;
    check(got.num() == g.expect_out.num(), "all outputs arrived");
    $display("core %s: %0d nodes, %0d outputs, %0d cycles", g.name, g.n, got.num(), cycles);
    if (g.name == "example") $display("  result = %0d", got[0]);
  endtask

  initial begin
    dfg g;
    automatic word_t xr[4] = '{100, -7, 33, 2000};
    automatic word_t xi[4] = '{5, 12, -300, 1};
    in_valid = 0; in_token = '0; out_full = 0; prog_we = 0; prog_addr = 0; prog_data = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    g = new("example"); g.example(); run(g, 0);
    g = new("fft4");    g.fft4(xr, xi); run(g, 30);
    for (int r = 0; r < 6; r++) begin
      g = new($sformatf("random%0d", r));
      g.random_graph(r == 5 ? NUM_NODES : 10 + 20 * r);
      run(g, (r % 2 != 0) ? 60 : 20);
    end
    check(n_fire > 0 && n_store > 0, "stores and firings");
    check(n_mstall > 0, "matcher waited for ALU FIFO");
    check(n_multi > 0, "multi-destination node");
    check(n_astall > 0, "ALU waited for output");
    $display("core events: store=%0d fire=%0d match_stall=%0d multi_dest=%0d alu_stall=%0d",
             n_store, n_fire, n_mstall, n_multi, n_astall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
