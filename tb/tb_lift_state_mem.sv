// tb_lift_state_mem: writes random words to every address of the default
// 256 x 79 state memory, in shuffled order, reads them all back, then
// checks that a read in the cycle of a write still returns the old word and
// that a cycle without write enable leaves the memory unchanged.
module tb_lift_state_mem;
  localparam int W = 79;
  localparam int D = 256;

  logic         clk = 0;
  logic         we;
  logic [7:0]   waddr, raddr;
  logic [W-1:0] wdata, rdata;
  logic [W-1:0] model [D];

  lift_state_mem dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic logic [W-1:0] rnd_word();
    return {$urandom, $urandom, $urandom, $urandom, $urandom};
  endfunction

  task automatic expect_word(logic [W-1:0] expv, string what);
    checks++;
    if (rdata !== expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s addr %0d", what, raddr);
    end
  endtask

  initial begin
    int order [D];
    we = 0; waddr = 0; raddr = 0; wdata = '0;
    foreach (order[i]) order[i] = i;
    order.shuffle();
    foreach (order[i]) begin
      @(negedge clk);
      we = 1; waddr = 8'(order[i]); wdata = rnd_word();
      model[order[i]] = wdata;
    end
    @(negedge clk) we = 0;
    for (int i = 0; i < D; i++) begin
      raddr = 8'(i); #1;
      expect_word(model[i], "readback");
    end
    // Read-during-write returns the old word; the new one is there next cycle.
    @(negedge clk);
    we = 1; waddr = 8'd77; raddr = 8'd77; wdata = rnd_word(); #1;
    expect_word(model[77], "read during write");
    model[77] = wdata;
    @(negedge clk) we = 0; #1;
    expect_word(model[77], "after write");
    // No write without enable.
    waddr = 8'd5; wdata = ~model[5];
    @(negedge clk); raddr = 8'd5; #1;
    expect_word(model[5], "write disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
