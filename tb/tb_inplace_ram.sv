// Random writes and reads against a reference array for one in-place memory
// bank (16 words of 64 bits). Read data must arrive one clock after the
// address; a read of the address being written returns the old word.
module tb_inplace_ram;
  localparam int DEPTH = 16, DW = 64;
  logic clk = 1'b0, we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;
  logic [DW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  inplace_ram #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] expv;
    // fill
    for (int i = 0; i < DEPTH; i++) begin
      ref_mem[i] = {$urandom, $urandom};
      we <= 1'b1; waddr <= 4'(i); wdata <= ref_mem[i];
      @(posedge clk);
    end
    we <= 1'b0;
    // random traffic
    for (int t = 0; t < 2000; t++) begin
      logic [3:0] ra, wa;
      logic w;
      logic [DW-1:0] d;
      ra = 4'($urandom); wa = 4'($urandom); w = 1'($urandom); d = {$urandom, $urandom};
      if ($urandom_range(0, 3) == 0) wa = ra;
      raddr <= ra; waddr <= wa; we <= w; wdata <= d;
      expv = ref_mem[ra];
      @(posedge clk);
      if (w) ref_mem[wa] = d;
      #1;
      checks++;
      if (rdata !== expv) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr %0d got %h exp %h", t, ra, rdata, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
