// tb_function_unit: exhaustive corner values and random operands for add,
// subtract and multiply, compared with 16-bit wrapped arithmetic computed in
// the testbench. Includes the operations of the example graph (1+2, 3*4,
// 3-12, 3+12, -9*15).
module tb_function_unit;
  import dfp_pkg::*;
  op_t op;
  word_t a, b, y;
  int checks = 0, failures = 0;

  function_unit dut (.*);

  function automatic word_t model(op_t o, word_t x, word_t z);
    int r;
    case (o)
      OP_ADD:  r = int'(x) + int'(z);
      OP_SUB:  r = int'(x) - int'(z);
      OP_MUL:  r = int'(x) * int'(z);
      default: r = 0;
    endcase
    return word_t'(r);
  endfunction

  task automatic try(op_t o, word_t x, word_t z);
    op = o; a = x; b = z;
    #1;
    checks++;
    if (y !== model(o, x, z)) begin
      failures++;
      $display("FAIL op=%0d a=%0d b=%0d y=%0d exp=%0d", o, x, z, y, model(o, x, z));
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners[6] = '{0, 1, -1, 16'sh7fff, -16'sh8000, 12};
    try(OP_ADD, 1, 2);
    checks++; if (y != 3) failures++;
    try(OP_MUL, 3, 4);
    checks++; if (y != 12) failures++;
    try(OP_SUB, 3, 12);
    checks++; if (y != -9) failures++;
    try(OP_ADD, 3, 12);
    checks++; if (y != 15) failures++;
    try(OP_MUL, -9, 15);
    checks++; if (y != -135) failures++;
    foreach (corners[i]) foreach (corners[j]) begin
      try(OP_ADD, corners[i], corners[j]);
      try(OP_SUB, corners[i], corners[j]);
      try(OP_MUL, corners[i], corners[j]);
    end
    repeat (3000) try(op_t'($urandom_range(0, 2)), word_t'($urandom), word_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
