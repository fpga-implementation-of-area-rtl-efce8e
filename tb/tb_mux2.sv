// tb_mux2 - check of the 2:1 multiplexer at its default width and at 6 bits.
//
// The 1-bit instance is driven exhaustively; the 6-bit one (the width of a
// 12:6 selection) with random data and both select values. Each output is
// compared with the input the select names. A watchdog guards the run.
module tb_mux2;
  logic       d0_1, d1_1, sel, y_1;
  logic [5:0] d0_6, d1_6, y_6;
  int         checks = 0, failures = 0;

  mux2 dut1 (.d0(d0_1), .d1(d1_1), .sel(sel), .y(y_1));
  mux2 #(.WIDTH(6)) dut6 (.d0(d0_6), .d1(d1_6), .sel(sel), .y(y_6));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d1_1, d0_1} = 3'(i);
      d0_6 = 6'($urandom);
      d1_6 = ~d0_6 ^ 6'($urandom);
      #1;
      checks += 2;
      if (y_1 !== (sel ? d1_1 : d0_1)) begin
        failures++;
        $display("FAIL 1-bit sel=%0b d0=%0b d1=%0b y=%0b", sel, d0_1, d1_1, y_1);
      end
      if (y_6 !== (sel ? d1_6 : d0_6)) begin
        failures++;
        $display("FAIL 6-bit sel=%0b d0=%h d1=%h y=%h", sel, d0_6, d1_6, y_6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
