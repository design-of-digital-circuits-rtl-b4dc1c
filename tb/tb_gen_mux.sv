// tb_gen_mux: self-checking test of the 8-input multiplexer.
//
// For random input words, applies every select value and compares y with
// the selected bit computed here.
module tb_gen_mux;

  localparam int L = 8, S = 3;

  logic [S-1:0] sel;
  logic [L-1:0] x;
  logic         y;

  int checks = 0, failures = 0;

  gen_mux #(.L(L), .S(S)) dut (.sel(sel), .x(x), .y(y));

  initial begin
    for (int t = 0; t < 64; t++) begin
      x = (t == 0) ? 8'h01 : (t == 1) ? 8'h80 : L'($urandom);
      for (int s = 0; s < L; s++) begin
        sel = S'(s);
        #1;
        checks++;
        if (y !== x[s]) begin
          failures++;
          $display("FAIL: x=%b sel=%0d y=%b", x, s, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
