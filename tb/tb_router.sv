// tb_router: cycle-by-cycle check of the router against a model.
//
// Random tokens, about a third of them marked for the output, are written to
// the external and the internal FIFO whenever they have room, while the
// matcher-side and the outside full lines toggle at random. The model holds
// the two FIFO contents. Each cycle it predicts the one token that must move:
// the internal head if there is one, else the external head, routed by its
// out flag, and only if that output is not full. The test checks that exactly
// that token appears on exactly that output, and that internal-over-external
// arbitration and both kinds of back pressure happened.
module tb_router;
  import dfp_pkg::*;
  logic clk = 0, rst = 1;
  logic ext_valid, ext_full, int_valid, int_full, core_valid, core_full;
  logic out_valid, out_full, int_over_ext;
  token_t ext_token, int_token, core_token, out_token;
  int checks = 0, failures = 0;

  router dut (.*);

  always #5 clk = ~clk;

  token_t ext_q[$], int_q[$];
  int n_prio = 0, n_out = 0, n_core = 0, n_block_out = 0, n_block_core = 0;

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

  function automatic token_t rnd_token();
    token_t t;
    t.value = word_t'($urandom);
    t.dest  = dest_t'($urandom);
    t.dest.to_out = ($urandom_range(0, 2) == 0);
    return t;
  endfunction

  initial begin
    in_valid_init();
    repeat (2) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      automatic bit     exp_send;
      automatic token_t head;
      automatic bit     from_int;
      @(negedge clk);
      // stimulus for this cycle
      core_full = ($urandom_range(0, 99) < 30);
      out_full  = ($urandom_range(0, 99) < 30);
      ext_valid = !ext_full && ($urandom_range(0, 99) < 50);
      int_valid = !int_full && ($urandom_range(0, 99) < 40);
      ext_token = rnd_token();
      int_token = rnd_token();
      #4;
      // prediction from the model
      from_int = (int_q.size() != 0);
      exp_send = 0;
      if (from_int || ext_q.size() != 0) begin
        head = from_int ? int_q[0] : ext_q[0];
        exp_send = head.dest.to_out ? !out_full : !core_full;
        if (!exp_send) begin
          if (head.dest.to_out) n_block_out++; else n_block_core++;
        end
        if (from_int && ext_q.size() != 0) n_prio++;
      end
      check(out_valid  == (exp_send &&  head.dest.to_out), "out_valid");
      check(core_valid == (exp_send && !head.dest.to_out), "core_valid");
      if (out_valid)  begin check(out_token == head, "out_token");  n_out++;  end
      if (core_valid) begin check(core_token == head, "core_token"); n_core++; end
      check(int_over_ext == (from_int && ext_q.size() != 0), "priority flag");
      // model update at the edge
      @(posedge clk);
      if (exp_send) begin
        if (from_int) void'(int_q.pop_front()); else void'(ext_q.pop_front());
      end
      if (ext_valid) ext_q.push_back(ext_token);
      if (int_valid) int_q.push_back(int_token);
    end
    check(n_prio > 0, "internal priority exercised");
    check(n_block_out > 0 && n_block_core > 0, "both back pressures exercised");
    check(n_out > 0 && n_core > 0, "both outputs used");
    $display("router: out=%0d core=%0d prio=%0d blocked out/core=%0d/%0d",
             n_out, n_core, n_prio, n_block_out, n_block_core);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic in_valid_init();
    ext_valid = 0; int_valid = 0; ext_token = '0; int_token = '0;
    core_full = 0; out_full = 0;
  endtask
endmodule
