// hazard_free_mux_tb: exhaustive truth table of the multiplexer
// (f = y when x = 1, f = z when x = 0), and a check that the consensus
// term y.z is present and holds f high while x switches with y = z = 1.
module hazard_free_mux_tb;
  logic x, y, z, f;
  int checks = 0, failures = 0;

  hazard_free_mux dut (.x, .y, .z, .f);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {x, y, z} = 3'(i);
      #1;
      checks++;
      if (f !== (x ? y : z)) begin
        failures++;
        $display("FAIL x=%b y=%b z=%b: f=%b", x, y, z, f);
      end
      checks++;
      if (dut.t_yz !== (y & z)) begin
        failures++;
        $display("FAIL consensus term missing for y=%b z=%b", y, z);
      end
    end
    // the critical transition: y = z = 1, x falls
    y = 1; z = 1; x = 1;
    #1;
    x = 0;
    checks++;
    if (dut.t_yz !== 1'b1) begin
      failures++;
      $display("FAIL consensus term not holding f during x change");
    end
    #1;
    checks++;
    if (f !== 1'b1) begin
      failures++;
      $display("FAIL f after x change");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
