// tb_data_router: drives random master and slave write strobes and bytes
// into data_router and compares its four registers, one clock later, with a
// reference computed here: master writes go to both slave inputs, a slave 1
// write sets out1 and clears out2, a slave 2 write sets out2 and clears out1
// (slave 2 wins when both write together), and nothing changes without a
// strobe. Reset must clear everything.
module tb_data_router;
  import kcpsm3_pkg::*;

  logic  clk = 1'b0, reset;
  logic  ws_m, ws_1, ws_2;
  byte_t op_m, op_1, op_2;
  byte_t in_1, in_2, out1, out2;
  byte_t e_in_1, e_in_2, e_out1, e_out2;
  int    checks = 0, failures = 0;
  int    n_both = 0, n_m = 0, n_hold = 0;

  always #5 clk = ~clk;

  data_router dut (
    .clk, .reset,
    .write_strobe_master (ws_m), .out_port_master (op_m),
    .write_strobe_slave1 (ws_1), .out_port_slave1 (op_1),
    .write_strobe_slave2 (ws_2), .out_port_slave2 (op_2),
    .in_port_slave1 (in_1), .in_port_slave2 (in_2), .out1, .out2
  );

  task automatic compare(input string when);
    checks++;
    if (in_1 !== e_in_1 || in_2 !== e_in_2 || out1 !== e_out1 || out2 !== e_out2) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got %h %h %h %h expected %h %h %h %h", when,
                 in_1, in_2, out1, out2, e_in_1, e_in_2, e_out1, e_out2);
    end
  endtask

  initial begin
    reset = 1'b1; ws_m = 0; ws_1 = 0; ws_2 = 0;
    op_m = 8'hA5; op_1 = 8'h5A; op_2 = 8'h3C;
    repeat (2) @(posedge clk);
    #1;
    e_in_1 = 0; e_in_2 = 0; e_out1 = 0; e_out2 = 0;
    compare("after reset");
    reset = 1'b0;
    repeat (2000) begin
      ws_m = ($urandom % 4) == 0;
      ws_1 = ($urandom % 4) == 0;
      ws_2 = ($urandom % 4) == 0;
      op_m = 8'($urandom); op_1 = 8'($urandom); op_2 = 8'($urandom);
      #2;
      // nothing may change before the edge
      compare("before edge");
      if (ws_m) begin e_in_1 = op_m; e_in_2 = op_m; n_m++; end
      if (ws_2) begin e_out1 = 0; e_out2 = op_2; end
      else if (ws_1) begin e_out1 = op_1; e_out2 = 0; end
      if (ws_1 && ws_2) n_both++;
      if (!ws_m && !ws_1 && !ws_2) n_hold++;
      @(posedge clk); #1;
      compare("after edge");
    end
    // reset in the middle clears all registers
    reset = 1'b1; @(posedge clk); #1;
    e_in_1 = 0; e_in_2 = 0; e_out1 = 0; e_out2 = 0;
    compare("second reset");
    checks++;
    if (n_both == 0 || n_m == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL: stimulus missed a case");
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
