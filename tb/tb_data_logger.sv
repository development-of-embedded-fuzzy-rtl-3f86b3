// tb_data_logger: simultaneous records from two channels are stored in
// channel order and read back in order with their contents intact; filling
// the 32-entry buffer past full drops records and counts them; a second
// request on a channel whose record is still pending replaces it and is
// counted as dropped.
module tb_data_logger;
  import flc_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, rd_en = 0;
  logic [1:0] wr_req = '0;
  log_rec_t wr_rec [2];
  logic rd_valid;
  log_rec_t rd_rec;
  logic [5:0] level;
  logic [15:0] dropped;
  log_rec_t expq [$];

  data_logger #(.NCH(2), .DEPTH(32)) dut (
    .clk, .rst_n, .wr_req, .wr_rec, .rd_en, .rd_valid, .rd_rec, .level, .dropped);

  always #5 clk = ~clk;

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic log_rec_t mk(int ch, int n);
    log_rec_t r;
    r.ch = 4'(ch);
    r.step = 16'(n);
    r.setpoint = 32'(n * 3 + ch);
    r.speed = -32'(n * 7);
    r.u = 16'(n - 50);
    return r;
  endfunction

  // both channels request in the same clock
  task automatic put_pair(int n);
    wr_rec[0] = mk(0, n);
    wr_rec[1] = mk(1, n);
    wr_req = 2'b11;
    @(negedge clk);
    wr_req = 2'b00;
    repeat (3) @(negedge clk);
  endtask

  task automatic drain();
    while (rd_valid) begin
      check(expq.size() > 0 && rd_rec == expq[0], $sformatf("record order/content, %0d left", expq.size()));
      void'(expq.pop_front());
      rd_en = 1;
      @(negedge clk);
      rd_en = 0;
      @(negedge clk);
    end
    check(expq.size() == 0, "all expected records read");
    expq.delete();
  endtask

  initial begin
    wr_rec[0] = '0;
    wr_rec[1] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 5; n++) begin
      put_pair(n);
      expq.push_back(mk(0, n));
      expq.push_back(mk(1, n));
    end
    check(level == 10, "level after 10 records");
    drain();
    check(dropped == 0, "nothing dropped");
    // overflow: 20 pairs = 40 records into 32 entries
    for (int n = 0; n < 20; n++) begin
      put_pair(100 + n);
      if (expq.size() < 32) expq.push_back(mk(0, 100 + n));
      if (expq.size() < 32) expq.push_back(mk(1, 100 + n));
    end
    check(level == 32, "full");
    check(dropped == 8, $sformatf("8 dropped, counted %0d", dropped));
    drain();
    // a channel requesting again while its record is pending behind channel 0
    wr_rec[0] = mk(0, 200);
    wr_rec[1] = mk(1, 200);
    wr_req = 2'b11;
    @(negedge clk);
    wr_rec[1] = mk(1, 201);
    wr_req = 2'b10;
    @(negedge clk);
    wr_req = 2'b00;
    repeat (3) @(negedge clk);
    expq.push_back(mk(0, 200));
    expq.push_back(mk(1, 201));
    check(dropped == 9, $sformatf("replaced record counted, %0d", dropped));
    drain();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
