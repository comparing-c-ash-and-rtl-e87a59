// tb_fifo: self-checking test of the arc FIFO.
//
// Random writes (only when not full, as a producer must) and random reads
// against a queue model. Checks rd_valid, rd_data and full every cycle, and
// that a full FIFO holds exactly DEPTH entries. Also checks a simultaneous
// read and write while full.
module tb_fifo;
  localparam int DEPTH = 4;
  logic clk = 0, rst = 1;
  logic wr_valid, full, rd_valid, rd;
  logic [7:0] wr_data, rd_data;
  int checks = 0, failures = 0;
  logic [7:0] model[$];
  int saw_full = 0, saw_rw_full = 0;

  fifo #(.T(logic [7:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_valid = 0; rd = 0; wr_data = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      @(negedge clk);
      // compare visible state with the model
      check(rd_valid == (model.size() != 0), "rd_valid");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() != 0) check(rd_data == model[0], "rd_data");
      if (full) saw_full++;
      // choose this cycle's actions; bias towards filling in phases
      rd       = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 70 : 30));
      wr_valid = ($urandom_range(0, 99) < ((cyc / 200) % 2 ? 30 : 70));
      if (full && !rd) wr_valid = 0;
      if (full && rd && wr_valid) saw_rw_full++;
      wr_data  = 8'($urandom);
      @(posedge clk);
      #1;
      if (rd && model.size() != 0) void'(model.pop_front());
      if (wr_valid) model.push_back(wr_data);
      wr_valid = 0; rd = 0;
    end
    check(saw_full > 0, "full reached");
    check(saw_rw_full > 0, "read+write while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
