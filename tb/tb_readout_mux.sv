// tb_readout_mux -- self-checking testbench for readout_mux: random words on
// both inputs, both select values, output compared with the selected input.
module tb_readout_mux;
  import dm_pkg::*;

  logic sel;
  logic [ACC_W-1:0] a, b, y;
  int checks = 0, failures = 0;

  readout_mux dut (.sel, .a, .b, .y);

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      a = ACC_W'($urandom);
      b = ACC_W'($urandom);
      sel = 1'(i);
      #10;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        if (failures < 10) $display("FAIL sel=%0d a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
