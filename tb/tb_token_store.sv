// tb_token_store: checks the explicit token store against a model.
//
// After reset every slot must be empty. Random stores and clears over all 128
// slots follow; each cycle a random slot is read back (asynchronous read) and
// compared with the model. A store and clear of the same slot in one cycle
// must leave it occupied.
module tb_token_store;
  import dfp_pkg::*;
  localparam int N = NUM_NODES;
  logic clk = 0, rst = 1;
  logic [6:0] rd_addr, wr_addr, clr_addr;
  logic rd_present, wr_en, clr_en;
  logic [15:0] rd_value, wr_value;
  int checks = 0, failures = 0;
  bit m_present[N];
  logic [15:0] m_value[N];

  token_store dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; clr_en = 0; rd_addr = 0; wr_addr = 0; clr_addr = 0; wr_value = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      rd_addr = 7'(i); #1;
      check(!rd_present, "empty after reset");
      m_present[i] = 0;
    end
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      wr_en = $urandom_range(0, 1); clr_en = $urandom_range(0, 2) == 0;
      wr_addr = 7'($urandom); wr_value = 16'($urandom);
      clr_addr = (cyc % 50 == 0) ? wr_addr : 7'($urandom);
      @(posedge clk); #1;
      if (clr_en) m_present[clr_addr] = 0;
      if (wr_en) begin m_present[wr_addr] = 1; m_value[wr_addr] = wr_value; end
      wr_en = 0; clr_en = 0;
      for (int k = 0; k < 2; k++) begin
        rd_addr = (k == 0) ? wr_addr : 7'($urandom); #1;
        check(rd_present == m_present[rd_addr], "presence");
        if (m_present[rd_addr]) check(rd_value == m_value[rd_addr], "value");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
