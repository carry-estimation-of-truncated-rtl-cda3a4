// tb_fft_main_mem: writes random words to random addresses while keeping a
// copy, reads them back one cycle later, checks that a cycle with we = 0
// writes nothing, and that a read of the address being written returns the
// old word. Finally it checks that the read register holds while re is
// low.
`timescale 1ns/1ps
module tb_fft_main_mem;
  import trunc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [10:0] raddr = '0, waddr = '0;
  logic we = 0, re = 1;
  mem_word_t rdata, wdata;
  mem_word_t shadow [2048];

  fft_main_mem dut (.*);
  always #5 clk = ~clk;

  initial begin
    // fill
    for (int a = 0; a < 2048; a++) begin
      @(negedge clk);
      we = 1; waddr = 11'(a); wdata = mem_word_t'($urandom); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 20000; t++) begin
      int ra;
      ra = int'($urandom_range(2047));
      @(negedge clk);
      raddr = 11'(ra);
      // random write, sometimes with we low, sometimes to the read address
      we    = $urandom_range(1);
      waddr = ($urandom_range(3) == 0) ? 11'(ra) : 11'($urandom);
      wdata = mem_word_t'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != shadow[ra]) begin
        failures++;
        if (failures < 10) $display("FAIL read %0d got %h exp %h", ra, rdata, shadow[ra]);
      end
      if (we) shadow[waddr] = wdata;
    end
    // with re low the output register keeps its word
    begin
      mem_word_t held;
      @(negedge clk);
      we = 0;
      held = rdata;
      re = 0;
      for (int t = 0; t < 200; t++) begin
        @(negedge clk);
        raddr = 11'($urandom);
        checks++;
        if (rdata != held) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
