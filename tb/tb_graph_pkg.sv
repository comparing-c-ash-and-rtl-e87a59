// tb_graph_pkg: dataflow programs and their reference results for the
// core- and processor-level testbenches.
//
// A dfg object holds a program (one instr_t per node), the list of input
// tokens that start it and the values expected on the outputs, keyed by the
// output tag carried in an out destination. Reference values are computed
// here in plain integer arithmetic, independently of the hardware:
//   * example(): the graph ((i0+i1)-(i2*i3))*((i0+i1)+(i2*i3)) with inputs
//     1,2,3,4, five nodes, result -135.
//   * fft4(): a four-point FFT of complex 16-bit inputs, 16 add/subtract
//     nodes and 16 input tokens; the reference is the direct DFT sum.
//   * random_graph(n): a random acyclic graph of n two-input nodes, each with
//     one to four destinations, some of them outputs.
// Output tags are node numbers (example, random) or 2*k+{0 real,1 imag} for
// FFT bin k.
package tb_graph_pkg;
  import dfp_pkg::*;

  function automatic word_t apply(op_t o, word_t a, word_t b);
    int r;
    case (o)
      OP_ADD:  r = int'(a) + int'(b);
      OP_SUB:  r = int'(a) - int'(b);
      default: r = int'(a) * int'(b);
    endcase
    return word_t'(r);
  endfunction

  class dfg;
    string  name;
    int     n;
    instr_t pm[NUM_NODES];
    int     ndest[NUM_NODES];
    token_t inputs[$];
    word_t  expect_out[int];

    function new(string nm);
      name = nm;
      n = 0;
      foreach (pm[i]) begin pm[i] = '0; ndest[i] = 0; end
    endfunction

    function void add_dest(int node, dest_t d);
      pm[node].dests[ndest[node]] = '{valid: 1'b1, dest: d};
      ndest[node]++;
    endfunction

    function void add_input(word_t v, int node, side_t s);
      inputs.push_back('{value: v, dest: mk_dest(node_t'(node), s)});
    endfunction

    function void shuffle_inputs();
      inputs.shuffle();
    endfunction

    // Figure-2 style example: node / op / destinations of the program table.
    function void example();
      n = 5;
      pm[0].op = OP_ADD; add_dest(0, mk_dest(2, SIDE_L)); add_dest(0, mk_dest(3, SIDE_L));
      pm[1].op = OP_MUL; add_dest(1, mk_dest(2, SIDE_R)); add_dest(1, mk_dest(3, SIDE_R));
      pm[2].op = OP_SUB; add_dest(2, mk_dest(4, SIDE_L));
      pm[3].op = OP_ADD; add_dest(3, mk_dest(4, SIDE_R));
      pm[4].op = OP_MUL; add_dest(4, mk_out(0));
      add_input(1, 0, SIDE_L);
      add_input(2, 0, SIDE_R);
      add_input(3, 1, SIDE_L);
      add_input(4, 1, SIDE_R);
      expect_out[0] = -135;  // ((1+2)-(3*4))*((1+2)+(3*4))
    endfunction

    // Four-point radix-2 FFT. x[k] real parts xr, imaginary parts xi.
    function void fft4(word_t xr[4], word_t xi[4]);
      n = 16;
      // first stage: a0 = x0+x2, a1 = x0-x2, b0 = x1+x3, b1 = x1-x3
      // node: 0 a0r 1 a0i 2 a1r 3 a1i 4 b0r 5 b0i 6 b1r 7 b1i
      for (int c = 0; c < 2; c++) begin  // c = 0 real, 1 imag
        word_t p0 = (c != 0) ? xi[0] : xr[0];
        word_t p1 = (c != 0) ? xi[1] : xr[1];
        word_t p2 = (c != 0) ? xi[2] : xr[2];
        word_t p3 = (c != 0) ? xi[3] : xr[3];
        pm[0 + c].op = OP_ADD; pm[2 + c].op = OP_SUB;
        pm[4 + c].op = OP_ADD; pm[6 + c].op = OP_SUB;
        add_input(p0, 0 + c, SIDE_L); add_input(p2, 0 + c, SIDE_R);
        add_input(p0, 2 + c, SIDE_L); add_input(p2, 2 + c, SIDE_R);
        add_input(p1, 4 + c, SIDE_L); add_input(p3, 4 + c, SIDE_R);
        add_input(p1, 6 + c, SIDE_L); add_input(p3, 6 + c, SIDE_R);
      end
      // second stage
      // 8 X0r = a0r+b0r   9 X0i = a0i+b0i  10 X2r = a0r-b0r  11 X2i = a0i-b0i
      // 12 X1r = a1r+b1i 13 X1i = a1i-b1r 14 X3r = a1r-b1i 15 X3i = a1i+b1r
      pm[8].op = OP_ADD;  pm[9].op = OP_ADD;  pm[10].op = OP_SUB; pm[11].op = OP_SUB;
      pm[12].op = OP_ADD; pm[13].op = OP_SUB; pm[14].op = OP_SUB; pm[15].op = OP_ADD;
      add_dest(0, mk_dest(8, SIDE_L));  add_dest(0, mk_dest(10, SIDE_L));
      add_dest(1, mk_dest(9, SIDE_L));  add_dest(1, mk_dest(11, SIDE_L));
      add_dest(2, mk_dest(12, SIDE_L)); add_dest(2, mk_dest(14, SIDE_L));
      add_dest(3, mk_dest(13, SIDE_L)); add_dest(3, mk_dest(15, SIDE_L));
      add_dest(4, mk_dest(8, SIDE_R));  add_dest(4, mk_dest(10, SIDE_R));
      add_dest(5, mk_dest(9, SIDE_R));  add_dest(5, mk_dest(11, SIDE_R));
      add_dest(6, mk_dest(13, SIDE_R)); add_dest(6, mk_dest(15, SIDE_R));
      add_dest(7, mk_dest(12, SIDE_R)); add_dest(7, mk_dest(14, SIDE_R));
      add_dest(8, mk_out(0));  add_dest(9, mk_out(1));   // X0
      add_dest(12, mk_out(2)); add_dest(13, mk_out(3));  // X1
      add_dest(10, mk_out(4)); add_dest(11, mk_out(5));  // X2
      add_dest(14, mk_out(6)); add_dest(15, mk_out(7));  // X3
      // reference: X[k] = sum_m x[m] * (-j)^(m*k)
      for (int k = 0; k < 4; k++) begin
        int re = 0, im = 0;
        for (int m = 0; m < 4; m++) begin
          case ((m * k) % 4)
            0: begin re += int'(xr[m]); im += int'(xi[m]); end
            1: begin re += int'(xi[m]); im -= int'(xr[m]); end   // * -j
            2: begin re -= int'(xr[m]); im -= int'(xi[m]); end   // * -1
            3: begin re -= int'(xi[m]); im += int'(xr[m]); end   // * j
          endcase
        end
        expect_out[2 * k]     = word_t'(re);
        expect_out[2 * k + 1] = word_t'(im);
      end
    endfunction

    // Random acyclic graph of nn nodes. Operands come from earlier nodes that
    // still have a free destination slot, or from input tokens.
    function void random_graph(int nn);
      int    src[NUM_NODES][2];
      word_t inval[NUM_NODES][2];
      word_t val[NUM_NODES];
      n = nn;
      for (int i = 0; i < nn; i++) begin
        pm[i].op = op_t'($urandom_range(0, 2));
        for (int s = 0; s < 2; s++) begin
          int j = -1;
          if (i > 0 && $urandom_range(0, 99) < 70) begin
            for (int tries = 0; tries < 8 && j < 0; tries++) begin
              int c = $urandom_range(0, i - 1);
              if (ndest[c] < MAX_DEST) j = c;
            end
          end
          src[i][s] = j;
          if (j >= 0) add_dest(j, mk_dest(node_t'(i), side_t'(s)));
          else begin
            inval[i][s] = word_t'($urandom_range(0, 40) - 20);
            add_input(inval[i][s], i, side_t'(s));
          end
        end
      end
      for (int i = 0; i < nn; i++)
        if (ndest[i] == 0 || (ndest[i] < MAX_DEST && $urandom_range(0, 9) == 0))
          add_dest(i, mk_out(node_t'(i)));
      for (int i = 0; i < nn; i++) begin
        word_t a = (src[i][0] >= 0) ? val[src[i][0]] : inval[i][0];
        word_t b = (src[i][1] >= 0) ? val[src[i][1]] : inval[i][1];
        val[i] = apply(pm[i].op, a, b);
        for (int d = 0; d < ndest[i]; d++)
          if (pm[i].dests[d].dest.to_out) expect_out[i] = val[i];
      end
      shuffle_inputs();
    endfunction
  endclass
endpackage
