// tb_top_module: end-to-end test of the master/slave PicoBlaze system.
//
// Three behavioural KCPSM3 models run the master and slave programs from the
// system's ROMs. The testbench keeps its own shadow of every glue register
// (slave inputs, out1/out2, the two captured acknowledgements and the
// master's input), computed from the strobes the cores drive, and compares
// the system's outputs with it on every clock. On top of that it checks the
// transaction level: the master writes 01h, 0Ch, 02h, 0Ch, ... in that
// order; slave 1 writes 0Ch with acknowledgement 80h and slave 2 writes
// 0Ch with acknowledgement 40h, strictly alternating; out1 and out2 carry
// 0Ch one at a time. Each mechanism of the system must occur at least once:
// a slave skipping a byte that is not its address, a slave accepting its
// address, the master polling an acknowledgement that has not arrived yet,
// the multiplexer returning each slave's acknowledgement, and each output
// being written. Half-way the system is reset and must start over cleanly,
// with the acknowledgements cleared. The top runs with its default
// configuration.
module tb_top_module;
  import kcpsm3_pkg::*;

  localparam int ROUNDS   = 6;      // complete slave1 + slave2 transfers
  localparam int WATCHDOG = 20000;  // cycles

  logic clk = 1'b0;
  logic reset;
  always #5 clk = ~clk;

  byte_t        out1, out2;
  pb_core_out_t m_bus, s1_bus, s2_bus;
  instr_t       m_instr, s1_instr, s2_instr;
  byte_t        m_in, s1_in, s2_in;
  logic         m_iack, s1_iack, s2_iack;

  top_module dut (
    .clk, .reset, .out1, .out2,
    .master_core (m_bus),  .instruction_master (m_instr),  .in_port_master (m_in),
    .slave1_core (s1_bus), .instruction_slave1 (s1_instr), .in_port_slave1 (s1_in),
    .slave2_core (s2_bus), .instruction_slave2 (s2_instr), .in_port_slave2 (s2_in)
  );

  kcpsm3 master_pico (
    .address (m_bus.address), .instruction (m_instr), .port_id (m_bus.port_id),
    .write_strobe (m_bus.write_strobe), .out_port (m_bus.out_port),
    .read_strobe (m_bus.read_strobe), .in_port (m_in), .interrupt (1'b0),
    .interrupt_ack (m_iack), .reset, .clk
  );
  kcpsm3 slave1_pico (
    .address (s1_bus.address), .instruction (s1_instr), .port_id (s1_bus.port_id),
    .write_strobe (s1_bus.write_strobe), .out_port (s1_bus.out_port),
    .read_strobe (s1_bus.read_strobe), .in_port (s1_in), .interrupt (1'b0),
    .interrupt_ack (s1_iack), .reset, .clk
  );
  kcpsm3 slave2_pico (
    .address (s2_bus.address), .instruction (s2_instr), .port_id (s2_bus.port_id),
    .write_strobe (s2_bus.write_strobe), .out_port (s2_bus.out_port),
    .read_strobe (s2_bus.read_strobe), .in_port (s2_in), .interrupt (1'b0),
    .interrupt_ack (s2_iack), .reset, .clk
  );

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycles, what);
    end
  endtask

  // Shadow of the glue registers.
  byte_t e_s1_in, e_s2_in, e_out1, e_out2, e_mult_a, e_mult_b, e_m_in;
  bit    shadow_valid = 0;

  // Transaction bookkeeping.
  byte_t m_expect [4] = '{8'h01, 8'h0C, 8'h02, 8'h0C};
  byte_t m_port   [4] = '{8'h00, 8'h00, 8'h01, 8'h01};
  int    m_idx = 0;
  int    last_slave = 2;
  int    n_s1_writes = 0, n_s2_writes = 0;
  int    n_s1_skip = 0, n_s2_skip = 0, n_s1_match = 0, n_s2_match = 0;
  int    n_master_wait = 0, n_ack1_read = 0, n_ack2_read = 0;
  int    n_out1 = 0, n_out2 = 0;
  bit    s1_data_next = 0, s2_data_next = 0;
  int    waits_before_reset = 0;

  always @(posedge clk) begin
    cycles++;
    if (reset) begin
      e_s1_in = 0; e_s2_in = 0; e_out1 = 0; e_out2 = 0;
      e_mult_a = 8'hFF; e_mult_b = 8'hFF; e_m_in = 8'hFF;
      shadow_valid = 1;
    end else begin
      // compare what the system shows this cycle with the shadow
      check(s1_in == e_s1_in, $sformatf("in_port_slave1 %h exp %h", s1_in, e_s1_in));
      check(s2_in == e_s2_in, $sformatf("in_port_slave2 %h exp %h", s2_in, e_s2_in));
      check(out1  == e_out1,  $sformatf("out1 %h exp %h", out1, e_out1));
      check(out2  == e_out2,  $sformatf("out2 %h exp %h", out2, e_out2));
      check(m_in  == e_m_in,  $sformatf("in_port_master %h exp %h", m_in, e_m_in));

      // master transactions
      if (m_bus.write_strobe) begin
        check(m_bus.out_port == m_expect[m_idx] && m_bus.port_id == m_port[m_idx],
              $sformatf("master write %h@%h, expected %h@%h", m_bus.out_port,
                        m_bus.port_id, m_expect[m_idx], m_port[m_idx]));
        m_idx = (m_idx + 1) % 4;
      end
      if (m_bus.read_strobe) begin
        if (m_bus.port_id == 8'h00) begin
          if ((m_in & 8'h7F) != 0) n_master_wait++; else n_ack1_read++;
        end else begin
          if ((m_in & 8'hBF) != 0) n_master_wait++; else n_ack2_read++;
        end
      end
      // slaves polling for their address: a read right after a matching
      // poll is the data read, every other read is a poll
      if (s1_bus.read_strobe) begin
        if (s1_data_next) s1_data_next = 0;
        else if ((s1_in & 8'h01) == 0) n_s1_skip++;
        else begin n_s1_match++; s1_data_next = 1; end
      end
      if (s2_bus.read_strobe) begin
        if (s2_data_next) s2_data_next = 0;
        else if ((s2_in & 8'h02) == 0) n_s2_skip++;
        else begin n_s2_match++; s2_data_next = 1; end
      end
      // slave transactions
      if (s1_bus.write_strobe) begin
        n_s1_writes++;
        check(s1_bus.out_port == 8'h0C, $sformatf("slave1 wrote %h", s1_bus.out_port));
        check(s1_bus.port_id == 8'h80, $sformatf("slave1 ack %h", s1_bus.port_id));
        check(last_slave == 2, "slave1 wrote twice in a row");
        last_slave = 1;
      end
      if (s2_bus.write_strobe) begin
        n_s2_writes++;
        check(s2_bus.out_port == 8'h0C, $sformatf("slave2 wrote %h", s2_bus.out_port));
        check(s2_bus.port_id == 8'h40, $sformatf("slave2 ack %h", s2_bus.port_id));
        check(last_slave == 1, "slave2 wrote twice in a row");
        last_slave = 2;
      end

      // advance the shadow by this clock edge
      e_m_in = m_bus.port_id[0] ? e_mult_b : e_mult_a;
      if (s1_bus.write_strobe) e_mult_a = s1_bus.port_id;
      if (s2_bus.write_strobe) e_mult_b = s2_bus.port_id;
      if (m_bus.write_strobe) begin e_s1_in = m_bus.out_port; e_s2_in = m_bus.out_port; end
      if (s2_bus.write_strobe) begin
        e_out1 = 0; e_out2 = s2_bus.out_port; n_out2++;
      end else if (s1_bus.write_strobe) begin
        e_out1 = s1_bus.out_port; e_out2 = 0; n_out1++;
      end
    end
  end

  initial begin
    reset = 1'b1;
    repeat (4) @(posedge clk);
    #1 reset = 1'b0;
    wait (n_s2_writes == ROUNDS / 2);
    // reset in mid-run: every register restarts, the acknowledgements are
    // cleared, so the master must wait for slave 2 once more
    waits_before_reset = n_master_wait;
    @(posedge clk); #1 reset = 1'b1;
    repeat (3) @(posedge clk);
    #1 reset = 1'b0;
    m_idx = 0; last_slave = 2; s1_data_next = 0; s2_data_next = 0;
    wait (n_s2_writes == ROUNDS);
    repeat (40) @(posedge clk);
    check(n_master_wait > waits_before_reset, "master did not wait again after reset");
    check(n_s1_writes >= ROUNDS, "slave1 did not complete every round");
    check(n_s1_skip  > 0, "slave1 never skipped a foreign address");
    check(n_s2_skip  > 0, "slave2 never skipped a foreign address");
    check(n_s1_match > 0, "slave1 never accepted its address");
    check(n_s2_match > 0, "slave2 never accepted its address");
    check(n_master_wait > 0, "master never waited for an acknowledgement");
    check(n_ack1_read > 0, "master never read slave1's acknowledgement");
    check(n_ack2_read > 0, "master never read slave2's acknowledgement");
    check(n_out1 > 0 && n_out2 > 0, "an output was never written");
    $display("rounds=%0d slave1_skips=%0d slave2_skips=%0d matches=%0d/%0d master_waits=%0d ack_reads=%0d/%0d out_writes=%0d/%0d cycles=%0d",
             n_s2_writes, n_s1_skip, n_s2_skip, n_s1_match, n_s2_match, n_master_wait,
             n_ack1_read, n_ack2_read, n_out1, n_out2, cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d cycles", WATCHDOG);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
