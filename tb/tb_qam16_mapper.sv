// tb_qam16_mapper -- exhaustive check of the QAM-16 Gray mapping: each 2-bit
// half is Gray-decoded to an index g in 0..3 and must give level 2g - 3.
module tb_qam16_mapper;
  logic [3:0]        sym;
  logic signed [2:0] i_lvl, q_lvl;
  int checks = 0, failures = 0;

  qam16_mapper dut (.*);

  function automatic int level(input logic [1:0] b);
    int g;
    g = 2 * int'(b[1]) + int'(b[1] ^ b[0]);
    return 2 * g - 3;
  endfunction

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      sym = 4'(s);
      #1;
      checks += 2;
      if (int'(i_lvl) != level(sym[3:2])) begin
        failures++;
        $display("FAIL sym %0d: I %0d expected %0d", s, i_lvl, level(sym[3:2]));
      end
      if (int'(q_lvl) != level(sym[1:0])) begin
        failures++;
        $display("FAIL sym %0d: Q %0d expected %0d", s, q_lvl, level(sym[1:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
