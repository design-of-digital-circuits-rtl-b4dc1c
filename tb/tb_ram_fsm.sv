// tb_ram_fsm: self-checking test of the cascaded RFSM at its default shape
// (8 inputs, 3 state bits, 4 outputs, 2 levels).
//
// Loads random contents into all of its RAMs through the write port, keeping
// shadow copies, clears the state with rst and then applies random inputs.
// At every cycle a reference model computes the next state by walking all
// levels in turn (mux RAM picks an input, level RAM maps {dummy state, bit}) and
// the output from the output RAM; the RFSM must match it exactly, one
// transition per clock. Repeated for several random programs, with a reset
// in between, so both the reload and the reset paths are exercised.
module tb_ram_fsm;

  localparam int L = 8, R = 3, N = 4, G = 2, S = 3;

  logic         clk = 1'b0;
  logic         rst;
  logic [G-1:0] we_a, wem_a;
  logic         weo;
  logic [N-1:0] di;
  logic [R:0]   ar;
  logic [L-1:0] x;
  logic [N-1:0] y;
  logic [R-1:0] state;

  logic [R-1:0] lram [G][2**(R+1)];
  logic [S-1:0] mram [G][2**R];
  logic [N-1:0] oram [2**R];
  logic [R-1:0] st;

  int checks = 0, failures = 0;

  ram_fsm #(.L(L), .R(R), .N(N), .G(G)) dut (
    .clk(clk), .rst(rst), .we_a(we_a), .wem_a(wem_a), .weo(weo), .di(di),
    .ar(ar), .x(x), .y(y), .state(state)
  );

  always #5 clk = ~clk;

  function automatic logic [R-1:0] model_next(logic [R-1:0] s, logic [L-1:0] in);
    logic [R-1:0] d;
    d = s;
    for (int g = 0; g < G; g++) d = lram[g][{d, in[mram[g][d]]}];
    return d;
  endfunction

  task automatic load_program();
    @(negedge clk);
    rst = 1'b1;
    for (int g = 0; g < G; g++) begin
      for (int a = 0; a < 2**(R+1); a++) begin
        @(negedge clk);
        we_a = '0; wem_a = '0; weo = 1'b0;
        we_a[g] = 1'b1; ar = (R+1)'(a); di = N'($urandom);
        lram[g][a] = di[R-1:0];
      end
      for (int a = 0; a < 2**R; a++) begin
        @(negedge clk);
        we_a = '0; wem_a = '0; weo = 1'b0;
        wem_a[g] = 1'b1; ar = (R+1)'(a); di = N'($urandom);
        mram[g][a] = di[S-1:0];
      end
    end
    for (int a = 0; a < 2**R; a++) begin
      @(negedge clk);
      we_a = '0; wem_a = '0; weo = 1'b1; ar = (R+1)'(a); di = N'($urandom);
      oram[a] = di;
    end
    @(negedge clk);
    we_a = '0; wem_a = '0; weo = 1'b0;
    #1;
    checks++;
    if (state != '0) begin
      failures++;
      $display("FAIL: state not held at 0 by rst");
    end
    rst = 1'b0;
  endtask

  initial begin
    rst = 1'b0; we_a = '0; wem_a = '0; weo = 1'b0; di = '0; ar = '0; x = '0;
    #1 rst = 1'b1;
    for (int p = 0; p < 6; p++) begin
      load_program();
      st = '0;
      for (int c = 0; c < 200; c++) begin
        x = L'($urandom);
        #1;
        checks++;
        if (state !== st || y !== oram[st]) begin
          failures++;
          $display("FAIL: program %0d cycle %0d: state %0d y %h, expected %0d %h", p, c, state, y, st, oram[st]);
        end
        st = model_next(st, x);
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
