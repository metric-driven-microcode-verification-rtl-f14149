// tb_inst_sram: self-checking test of the instruction SRAM.
// Writes random words to random addresses, reads them back and checks the
// one-cycle read latency and that the output holds while the SRAM is idle or
// being written. A shadow copy in an associative array gives the expected data.
module tb_inst_sram;
  localparam int AW = 16, DW = 32;
  logic clk = 1'b0;
  logic csn = 1'b1, wen = 1'b1;
  logic [AW-1:0] a = '0;
  logic [DW-1:0] d = '0, q;
  logic [DW-1:0] shadow [logic [AW-1:0]];
  logic [AW-1:0] addrs [$];
  int checks = 0, failures = 0;

  inst_sram #(.AW(AW), .DW(DW)) dut (.i_clk(clk), .i_csn(csn), .i_wen(wen), .i_a(a), .i_d(d), .o_q(q));

  always #5 clk = ~clk;

  task automatic check(logic [DW-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [DW-1:0] last;
    // write 200 words, both ends of the address space included
    for (int i = 0; i < 200; i++) begin
      logic [AW-1:0] ad;
      ad = (i == 0) ? '0 : (i == 1) ? '1 : AW'($urandom);
      @(negedge clk); csn = 1'b0; wen = 1'b0; a = ad; d = $urandom;
      if (!shadow.exists(ad)) addrs.push_back(ad);
      shadow[ad] = d;
    end
    @(negedge clk); csn = 1'b1; wen = 1'b1;
    // back-to-back reads: data one cycle after the address
    foreach (addrs[i]) begin
      @(negedge clk); csn = 1'b0; wen = 1'b1; a = addrs[i];
      @(posedge clk); #1 check(shadow[addrs[i]], "read");
    end
    last = shadow[addrs[addrs.size()-1]];
    // idle: output holds
    @(negedge clk); csn = 1'b1; a = addrs[0];
    repeat (3) begin @(posedge clk); #1 check(last, "hold idle"); end
    // a write does not disturb the output
    @(negedge clk); csn = 1'b0; wen = 1'b0; a = addrs[0]; d = 32'hdeadbeef; shadow[addrs[0]] = d;
    @(posedge clk); #1 check(last, "hold during write");
    @(negedge clk); wen = 1'b1;
    @(posedge clk); #1 check(32'hdeadbeef, "read after overwrite");
    // read latency: the word is not visible in the cycle of the address
    @(negedge clk); a = addrs[1]; #1 check(32'hdeadbeef, "no zero-latency read");
    @(posedge clk); #1 check(shadow[addrs[1]], "read next");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
