// Fills the 32 x 32 frame SRAM, then mixes random reads and writes against
// a reference array. Read data must arrive one clock after the address and
// hold while the SRAM is idle.
module tb_frame_sram;
  localparam int N = 32, DW = 64;
  logic clk = 1'b0, en = 1'b0, we = 1'b0;
  logic [9:0] addr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [N*N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  frame_sram #(.N(N), .DW(DW)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N * N; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      en <= 1'b1; we <= 1'b1; addr <= 10'(i); wdata <= ref_mem[i];
      @(posedge clk);
    end
    for (int t = 0; t < 4000; t++) begin
      logic [9:0] a;
      a = 10'($urandom);
      if ($urandom_range(0, 2) == 0) begin
        ref_mem[a] = {$urandom, $urandom};
        en <= 1'b1; we <= 1'b1; addr <= a; wdata <= ref_mem[a];
        @(posedge clk);
      end else begin
        en <= 1'b1; we <= 1'b0; addr <= a;
        @(posedge clk);
        en <= 1'b0;
        addr <= 10'($urandom);  // idle: a new address must not be read
        #1;
        checks++;
        if (rdata != ref_mem[a]) begin
          failures++;
          if (failures < 10) $display("FAIL addr %0d", a);
        end
        @(posedge clk);  // idle clock: data must hold
        #1;
        checks++;
        if (rdata != ref_mem[a]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
