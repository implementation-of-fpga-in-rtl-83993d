// tb_tlc_light_dec: compares the lamp decoder with the output truth table,
// written out row by row as {HR,HY,HG,CR,CY,CG}.
module tb_tlc_light_dec;
  import tlc_pkg::*;

  tlc_state_e state;
  tlc_lights_t lights;
  int checks = 0, failures = 0;
  logic [5:0] table_rows [8] = '{
    6'b001100,  // A1: highway green, side red
    6'b001100,  // A2
    6'b001100,  // A3
    6'b001100,  // A4
    6'b010100,  // B : highway yellow, side red
    6'b100001,  // C1: highway red, side green
    6'b100001,  // C2
    6'b100010   // D : highway red, side yellow
  };

  tlc_light_dec dut (.*);

  initial begin
    for (int s = 0; s < 8; s++) begin
      state = tlc_state_e'(s);
      #1;
      checks++;
      if (lights != table_rows[s]) begin
        failures++;
        $display("FAIL state %0d lights %b expected %b", s, lights, table_rows[s]);
      end
      // never green or yellow on both roads at once
      checks++;
      if ((lights.hg | lights.hy) & (lights.cg | lights.cy)) begin
        failures++; $display("FAIL conflicting lamps in state %0d", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
