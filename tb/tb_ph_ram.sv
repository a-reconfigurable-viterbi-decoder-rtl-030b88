// tb_ph_ram: random writes and reads on the 2K x 8 RAM against a model;
// read data must appear exactly one clock after the address and hold while
// re is low.
module tb_ph_ram;
  logic clk = 0, we = 0, re = 0;
  logic [10:0] waddr = '0, raddr = '0;
  logic [7:0] wdata = '0, rdata;
  logic [7:0] model [2048];
  bit valid [2048];
  int checks = 0, failures = 0;

  ph_ram #(.DEPTH(2048), .WIDTH(8)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    logic [7:0] exp;
    bit have;
    have = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      if (have) begin
        checks++;
        if (rdata !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d got %h exp %h", t, rdata, exp);
        end
      end
      we = ($urandom_range(1) == 1); waddr = 11'($urandom); wdata = 8'($urandom);
      re = ($urandom_range(3) != 0); raddr = (t % 3 == 0) ? waddr : 11'($urandom);
      if (re) begin
        have = valid[raddr];
        exp = model[raddr];
      end
      @(posedge clk);
      if (we) begin
        model[waddr] = wdata;
        valid[waddr] = 1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
