// tb_rh_memory: checks that the reconfiguration memory block holds the
// ones-counting program.
//
// Reads all 56 words and compares them with the program listed here word by
// word; reading past the last word must give 0.
module tb_rh_memory;

  localparam int WORDS = 56, W = 9, AW = 6;

  // The ones-counting program: level RAM 1 (words 0-15), level RAM 2
  // (16-31), mux RAM 1 (32-39), mux RAM 2 (40-47), output RAM (48-55).
  localparam logic [W-1:0] PROGRAM [WORDS] = '{
    9'h011, 9'h011, 9'h014, 9'h010, 9'h014, 9'h010, 9'h014, 9'h010,
    9'h014, 9'h014, 9'h010, 9'h010, 9'h010, 9'h010, 9'h010, 9'h010,
    9'h020, 9'h020, 9'h021, 9'h021, 9'h022, 9'h022, 9'h023, 9'h023,
    9'h022, 9'h023, 9'h020, 9'h020, 9'h020, 9'h020, 9'h020, 9'h020,
    9'h040, 9'h041, 9'h041, 9'h041, 9'h040, 9'h040, 9'h040, 9'h040,
    9'h080, 9'h080, 9'h080, 9'h080, 9'h082, 9'h080, 9'h080, 9'h080,
    9'h101, 9'h102, 9'h104, 9'h10c, 9'h100, 9'h100, 9'h100, 9'h100
  };

  logic [AW-1:0] addr;
  logic [W-1:0]  data;

  int checks = 0, failures = 0;

  rh_memory #(.WORDS(WORDS), .W(W), .AW(AW)) dut (.addr(addr), .data(data));

  initial begin
    for (int a = 0; a < 2**AW; a++) begin
      addr = AW'(a);
      #1;
      checks++;
      if (data !== ((a < WORDS) ? PROGRAM[a] : '0)) begin
        failures++;
        $display("FAIL: word %0d = %h", a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
