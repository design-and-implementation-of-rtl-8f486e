// tb_ppg: self-checking test of the partial-product grid.
// For N = 4 (the default) every one of the 256 operand pairs is applied and
// pp[i*N+j] is compared with x[i] & y[j]; the garbage bits are compared with
// the values the gate equations predict (last-column and last-row Peres
// cells give x ^ y, the corner gives x3 and x3 ^ y3). A second instance with
// N = 3 is tested exhaustively in the same way. A watchdog ends a hung run.
module tb_ppg;
  int checks = 0, failures = 0;

  logic [3:0]  x4, y4;
  logic [15:0] pp4;
  logic [7:0]  g4;
  logic [2:0]  x3, y3;
  logic [8:0]  pp3;
  logic [5:0]  g3;

  ppg dut4 (.x(x4), .y(y4), .pp(pp4), .garbage(g4));
  ppg #(.N(3)) dut3 (.x(x3), .y(y3), .pp(pp3), .garbage(g3));

  // expected garbage of an n x n grid
  function automatic logic [15:0] exp_garbage(int n, logic [7:0] x, logic [7:0] y);
    logic [15:0] g = '0;
    for (int i = 0; i < n - 1; i++) g[i] = x[i] ^ y[n-1];           // last column
    for (int j = 0; j < n - 1; j++) g[n-1+j] = x[n-1] ^ y[j];       // last row
    g[2*n-2] = x[n-1];                                               // corner p
    g[2*n-1] = x[n-1] ^ y[n-1];                                      // corner q
    return g;
  endfunction

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      {x4, y4} = 8'(v);
      x3 = 3'(v);
      y3 = 3'(v >> 3);
      #1;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) begin
          checks++;
          if (pp4[i*4+j] !== (x4[i] & y4[j])) begin
            failures++;
            $display("FAIL N=4 x=%b y=%b P%0d%0d=%b", x4, y4, i, j, pp4[i*4+j]);
          end
        end
      checks++;
      if (16'(g4) !== (exp_garbage(4, 8'(x4), 8'(y4)) & 16'h00FF)) begin
        failures++;
        $display("FAIL N=4 x=%b y=%b garbage=%b", x4, y4, g4);
      end
      if (v < 64) begin
        for (int i = 0; i < 3; i++)
          for (int j = 0; j < 3; j++) begin
            checks++;
            if (pp3[i*3+j] !== (x3[i] & y3[j])) begin
              failures++;
              $display("FAIL N=3 x=%b y=%b P%0d%0d=%b", x3, y3, i, j, pp3[i*3+j]);
            end
          end
        checks++;
        if (16'(g3) !== exp_garbage(3, 8'(x3), 8'(y3))) begin
          failures++;
          $display("FAIL N=3 x=%b y=%b garbage=%b", x3, y3, g3);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
