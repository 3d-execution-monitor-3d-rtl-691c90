// tb_tsv_link: checks the interlayer link at its default width of 50 posts.
// After reset the output must read zero; afterwards every random word driven
// on the target side must appear on the monitor side exactly one clock
// later, not earlier and not later.
module tb_tsv_link;
  localparam int unsigned W = 50;

  logic         clk = 1'b0;
  logic         rst_n = 1'b0;
  logic [W-1:0] tgt, mon, expect_q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tsv_link dut (.clk(clk), .rst_n(rst_n), .tgt_i(tgt), .mon_o(mon));

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    tgt = {$urandom, $urandom};
    repeat (2) @(posedge clk);
    @(negedge clk);
    check(mon == '0, "reset value");
    rst_n = 1'b1;
    expect_q = {$urandom, $urandom};
    tgt = expect_q;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      check(mon == expect_q, $sformatf("cycle %0d: %h != %h", i, mon, expect_q));
      expect_q = {$urandom, $urandom};
      tgt = expect_q;
      #1;   // the new word must not pass before the next clock edge
      check(mon != expect_q, $sformatf("cycle %0d: passed without a clock", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
