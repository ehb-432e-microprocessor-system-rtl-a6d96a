// tb_ack_mux: drives random slave write strobes, slave port_ids and master
// select bits into ack_mux and compares in_port_master with a reference
// computed here: each slave's port_id is captured on its write strobe, and
// the master's input register takes slave 1's capture when the select bit is
// 0 and slave 2's when it is 1. Checks the reset value FFh, that a captured
// code holds without a strobe, and the latencies: one edge from a select
// change, two edges from a slave write.
module tb_ack_mux;
  import kcpsm3_pkg::*;

  logic  clk = 1'b0, reset;
  logic  ws_1, ws_2, sel;
  byte_t pid_1, pid_2, in_m;
  byte_t e_a, e_b, e_in;
  int    checks = 0, failures = 0;
  int    n_sel0 = 0, n_sel1 = 0;

  always #5 clk = ~clk;

  ack_mux dut (
    .clk, .reset,
    .write_strobe_slave1 (ws_1), .port_id_slave1 (pid_1),
    .write_strobe_slave2 (ws_2), .port_id_slave2 (pid_2),
    .port_id_master_lsb (sel), .in_port_master (in_m)
  );

  task automatic compare(input byte_t exp, input string when);
    checks++;
    if (in_m !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: in_port_master %h expected %h", when, in_m, exp);
    end
  endtask

  initial begin
    reset = 1'b1; ws_1 = 0; ws_2 = 0; sel = 0; pid_1 = 0; pid_2 = 0;
    repeat (2) @(posedge clk); #1;
    compare(8'hFF, "reset");
    reset = 1'b0;
    e_a = 8'hFF; e_b = 8'hFF; e_in = 8'hFF;
    // directed: slave 1 acknowledges with 80h, seen two edges later
    ws_1 = 1; pid_1 = 8'h80; sel = 0;
    @(posedge clk); #1;
    ws_1 = 0; pid_1 = 8'h7F;
    compare(8'hFF, "one edge after slave 1 write");
    @(posedge clk); #1;
    compare(8'h80, "two edges after slave 1 write");
    // directed: slave 2 acknowledges with 40h; select 1 one edge later
    ws_2 = 1; pid_2 = 8'h40;
    @(posedge clk); #1;
    ws_2 = 0; pid_2 = 8'hBF; sel = 1;
    compare(8'h80, "select still 0");
    @(posedge clk); #1;
    compare(8'h40, "one edge after select change");
    sel = 0;
    @(posedge clk); #1;
    compare(8'h80, "captured code holds");
    e_a = 8'h80; e_b = 8'h40; e_in = 8'h80;
    // random
    repeat (2000) begin
      ws_1 = ($urandom % 5) == 0;
      ws_2 = ($urandom % 5) == 0;
      sel  = 1'($urandom);
      pid_1 = 8'($urandom); pid_2 = 8'($urandom);
      if (sel) n_sel1++; else n_sel0++;
      #2;
      compare(e_in, "before edge");
      e_in = sel ? e_b : e_a;
      if (ws_1) e_a = pid_1;
      if (ws_2) e_b = pid_2;
      @(posedge clk); #1;
      compare(e_in, "after edge");
    end
    checks++;
    if (n_sel0 == 0 || n_sel1 == 0) begin failures++; $display("FAIL: select not exercised"); end
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
