// tb_slave1_rom: checks every program word of slave1_rom against a hand-assembled
// copy of the program (KCPSM3 encoding), checks that unused words read as
// zero, and checks the one-clock read latency: the word for a new address
// appears only after the next rising clock edge.
module tb_slave1_rom;
  import kcpsm3_pkg::*;

  localparam int N = 9;
  localparam instr_t EXPECTED [N] = '{18'h00A05, 18'h00A05, 18'h00A05, 18'h0417F, 18'h12101, 18'h35003, 18'h0427F, 18'h2C280, 18'h34003};

  logic   clk = 1'b0;
  pc_t    address;
  instr_t instruction;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  slave1_rom dut (.clk, .address, .instruction);

  task automatic expect_word(input pc_t a, input instr_t w);
    address = a;
    @(posedge clk); #1;
    checks++;
    if (instruction !== w) begin
      failures++;
      $display("FAIL: word %0d = %05h, expected %05h", a, instruction, w);
    end
  endtask

  initial begin
    address = '0;
    @(posedge clk); #1;
    for (int a = 0; a < N; a++) expect_word(pc_t'(a), EXPECTED[a]);
    // unused words
    expect_word(pc_t'(N), '0);
    expect_word(10'h3FF, '0);
    repeat (20) expect_word(pc_t'(N + ($urandom % (1024 - N))), '0);
    // latency: change the address between edges, output must hold
    expect_word(10'd1, EXPECTED[1]);
    address = 10'd2;
    #2;
    checks++;
    if (instruction !== EXPECTED[1]) begin
      failures++;
      $display("FAIL: output changed before the clock edge");
    end
    @(posedge clk); #1;
    checks++;
    if (instruction !== EXPECTED[2]) begin
      failures++;
      $display("FAIL: output did not follow one edge later");
    end
    // random reads over the program
    repeat (50) begin
      int a = $urandom % N;
      expect_word(pc_t'(a), EXPECTED[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
