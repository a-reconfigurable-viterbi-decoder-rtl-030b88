// tb_input_ram: fills the configuration RAM, reads every word back
// (asynchronous read), then checks write-through: a read of the address being
// written returns the new word in the same cycle, a read elsewhere the old one.
module tb_input_ram;
  logic clk = 0, we = 0, bypass;
  logic [4:0] waddr = '0, raddr = '0;
  logic [9:0] wdata = '0, rdata;
  logic [9:0] model [32];
  int checks = 0, failures = 0;

  input_ram #(.DEPTH(32), .WIDTH(10)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(logic [9:0] exp, string what);
    checks++;
    if (rdata !== exp) begin
      failures++;
      $display("FAIL %s addr %0d: got %h exp %h", what, raddr, rdata, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++) begin
      @(negedge clk);
      we = 1; waddr = 5'(a); wdata = 10'($urandom); model[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    for (int a = 0; a < 32; a++) begin
      raddr = 5'(a);
      #1 chk(model[a], "readback");
    end
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      we = 1; waddr = 5'($urandom); wdata = 10'($urandom);
      raddr = (t % 2 == 0) ? waddr : 5'($urandom);
      #1;
      if (raddr == waddr) begin
        chk(wdata, "write-through");
        checks++;
        if (!bypass) begin failures++; $display("FAIL bypass flag low"); end
      end else chk(model[raddr], "other");
      @(posedge clk);
      model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
