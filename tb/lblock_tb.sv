// lblock_tb: checks the LBlock core against the published test vectors of the
// cipher and checks that each encryption takes exactly 32 clock cycles.
module lblock_tb;
  import stap_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [63:0] pt, ct;
  logic [79:0] key;
  logic busy, done;
  int checks = 0, failures = 0;

  lblock dut (.clk, .rst_n, .start, .plaintext(pt), .key, .busy, .done, .ciphertext(ct));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [63:0] p, input logic [79:0] k, input logic [63:0] exp);
    int cycles;
    @(negedge clk);
    pt = p; key = k; start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    checks++;
    if (ct !== exp) begin
      failures++;
      $display("FAIL ct=%h expected %h", ct, exp);
    end
    checks++;
    if (cycles != 33) begin   // 32 rounds, done one cycle after the last
      failures++;
      $display("FAIL latency %0d cycles", cycles);
    end
    // result must hold after done
    @(negedge clk);
    checks++;
    if (ct !== exp || busy) begin failures++; $display("FAIL result not held"); end
  endtask

  initial begin
    pt = '0; key = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(64'h0, 80'h0, 64'hc218185308e75bcd);
    run(64'h0123456789abcdef, 80'h0123456789abcdeffedc, 64'h4b7179d8ebee0c26);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
