// tb_iso_clamp: self-checking test of the isolation clamps.
//
// With isolaten high every input bit must pass unchanged; with isolaten low
// every output bit must be 0. Random vectors are applied in both states.
module tb_iso_clamp;

  localparam int W = 37;

  logic         isolaten = 1;
  logic [W-1:0] d = '0, q;

  int checks = 0, failures = 0;

  iso_clamp #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      d = {$urandom, $urandom};
      isolaten = k[0];
      #1;
      checks++;
      if (q !== (isolaten ? d : '0)) begin
        failures++;
        $display("FAIL isolaten=%b d=%h q=%h", isolaten, d, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
