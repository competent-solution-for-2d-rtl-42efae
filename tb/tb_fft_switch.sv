// Random words through the 2x2 switch in both settings: straight through
// with swap = 0, exchanged with swap = 1.
module tb_fft_switch;
  localparam int DW = 64;
  logic swap;
  logic [DW-1:0] in0, in1, out0, out1;
  int checks = 0, failures = 0;

  fft_switch #(.DW(DW)) dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      swap = 1'(t % 2);
      in0 = {$urandom, $urandom};
      in1 = {$urandom, $urandom};
      #1;
      checks++;
      if ((swap == 0 && (out0 != in0 || out1 != in1)) ||
          (swap == 1 && (out0 != in1 || out1 != in0))) begin
        failures++;
        $display("FAIL swap=%0d", swap);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
