// tb_pingpong_cache: drives the cache exactly as the controller does.
//
// Pair 0: for every offset o = 0..31, the 64 words at main-memory addresses
// o + 32*j + 256*m (j, m = 0..7) are written in stage-0 group order, then
// read back in stage-1 group order (block*256 + o + 32*m'). Pair 1: for
// every 32-word block, the words are written in stage-2 order (b + 4*m)
// and read in stage-3 order (8 consecutive words). Every read is compared
// with a copy kept by main-memory address, so any two addresses of a
// window that share a cache slot are caught. The read register must hold
// while re is low.
`timescale 1ns/1ps
module tb_pingpong_cache;
  import trunc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic pair = 0, re = 0, we = 0;
  logic [10:0] raddr = '0, waddr = '0;
  mem_word_t rdata, wdata = '0;
  mem_word_t shadow [2048];

  pingpong_cache dut (.*);
  always #5 clk = ~clk;

  task automatic put(input int a);
    @(negedge clk);
    we = 1; re = 0; waddr = 11'(a);
    wdata = mem_word_t'({$urandom, $urandom});
    shadow[a] = wdata;
    @(negedge clk);
    we = 0;
  endtask

  task automatic get(input int a);
    @(negedge clk);
    re = 1; raddr = 11'(a);
    @(negedge clk);
    re = 0;
    checks++;
    if (rdata != shadow[a]) begin
      failures++;
      if (failures < 10) $display("FAIL pair %0d address %0d got %h expected %h", pair, a, rdata, shadow[a]);
    end
    // the register holds with re low
    raddr = 11'($urandom);
    @(negedge clk);
    checks++;
    if (rdata != shadow[a]) failures++;
  endtask

  initial begin
    pair = 0;
    for (int o = 0; o < 32; o++) begin
      for (int j = 0; j < 8; j++)
        for (int m = 0; m < 8; m++) put(o + 32 * j + 256 * m);
      for (int blk = 0; blk < 8; blk++)
        for (int m = 0; m < 8; m++) get(blk * 256 + o + 32 * m);
    end
    pair = 1;
    for (int blk = 0; blk < 64; blk++) begin
      for (int b = 0; b < 4; b++)
        for (int m = 0; m < 8; m++) put(blk * 32 + b + 4 * m);
      for (int q = 0; q < 32; q++) get(blk * 32 + q);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
