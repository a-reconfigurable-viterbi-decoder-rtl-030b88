// tb_pm_memory: checks the start metrics under init, that writes go to the
// bank not being read, that both read ports return the right rows, and that
// swapping rd_bank exposes the written bank.
module tb_pm_memory;
  import viterbi_pkg::*;
  logic clk = 0, rd_bank = 0, init = 1, we = 0;
  logic [4:0] rd_row1 = '0, rd_row2 = '0, wr_row = '0;
  pm_t rd_data1 [NUM_ACS];
  pm_t rd_data2 [NUM_ACS];
  pm_t wr_data [NUM_ACS];
  pm_t model [2][32][NUM_ACS];
  int checks = 0, failures = 0;

  pm_memory #(.ROWS(32)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(pm_t got, pm_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    // start metrics
    for (int r = 0; r < 32; r++) begin
      rd_row1 = 5'(r); rd_row2 = 5'(31 - r);
      #1;
      for (int i = 0; i < NUM_ACS; i++) begin
        chk(rd_data1[i], (r == 0 && i == 0) ? pm_t'(0) : pm_t'(-INIT_PENALTY), "init p1");
        chk(rd_data2[i], (31 - r == 0 && i == 0) ? pm_t'(0) : pm_t'(-INIT_PENALTY), "init p2");
      end
    end
    init = 0;
    // fill both banks: rd_bank = b writes bank !b
    for (int b = 0; b < 2; b++) begin
      for (int r = 0; r < 32; r++) begin
        @(negedge clk);
        rd_bank = b[0]; we = 1; wr_row = 5'(r);
        for (int i = 0; i < NUM_ACS; i++) begin
          wr_data[i] = pm_t'($urandom);
          model[1 - b][r][i] = wr_data[i];
        end
      end
    end
    @(negedge clk);
    we = 0;
    for (int b = 0; b < 2; b++) begin
      rd_bank = b[0];
      for (int r = 0; r < 32; r++) begin
        rd_row1 = 5'(r); rd_row2 = 5'($urandom);
        #1;
        for (int i = 0; i < NUM_ACS; i++) begin
          chk(rd_data1[i], model[b][r][i], "port1");
          chk(rd_data2[i], model[b][rd_row2][i], "port2");
        end
      end
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
