// tap_fsm_tb: checks the TAP state machine against an independent reference
// model of the 1149.1 state diagram (written with its own state numbering),
// using the document's 40-bit TMS test pattern followed by random TMS. Every
// state, every control output, the five-TMS-high reset from each state and the
// asynchronous TRSTN reset are checked; all 16 states must be visited.
module tap_fsm_tb;
  import stap_pkg::*;

  logic tck = 0, trst_n = 1, tms = 1;
  tap_state_e state;
  tap_ctrl_t  ctrl;
  int checks = 0, failures = 0;

  tap_fsm dut (.tck, .trst_n, .tms, .state, .ctrl);

  always #5 tck = ~tck;

  initial begin
    repeat (5000) @(posedge tck);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: states numbered 0..15 in the order of the standard's diagram.
  //  0 TLR 1 RTI 2 SelDR 3 CapDR 4 ShDR 5 Ex1DR 6 PauDR 7 Ex2DR 8 UpdDR
  //  9 SelIR 10 CapIR 11 ShIR 12 Ex1IR 13 PauIR 14 Ex2IR 15 UpdIR
  int nx0 [16] = '{1, 1, 3, 4, 4, 6, 6, 4, 1, 10, 11, 11, 13, 13, 11, 1};
  int nx1 [16] = '{0, 2, 9, 5, 5, 8, 7, 8, 2, 0, 12, 12, 15, 14, 15, 2};
  logic [3:0] enc [16] = '{4'hF, 4'hC, 4'h7, 4'h6, 4'h2, 4'h1, 4'h3, 4'h0, 4'h5,
                           4'h4, 4'hE, 4'hA, 4'h9, 4'hB, 4'h8, 4'hD};
  int ref_s;
  bit seen [16];

  task automatic check_now();
    logic [10:0] exp;
    checks++;
    if (state !== enc[ref_s]) begin
      failures++;
      $display("FAIL state %h expected %h", state, enc[ref_s]);
    end
    // clock_dr shift_dr update_dr capture_dr clock_ir shift_ir update_ir
    // capture_ir reset_n select enable
    exp = {ref_s == 3 || ref_s == 4, ref_s == 4, ref_s == 8, ref_s == 3,
           ref_s == 10 || ref_s == 11, ref_s == 11, ref_s == 15, ref_s == 10,
           ref_s != 0, ref_s <= 1 || ref_s >= 10, ref_s == 4 || ref_s == 11};
    checks++;
    if (ctrl !== exp) begin
      failures++;
      $display("FAIL outputs %b expected %b in ref state %0d", ctrl, exp, ref_s);
    end
    seen[ref_s] = 1;
  endtask

  task automatic step(input logic t);
    @(negedge tck);
    tms = t;
    @(posedge tck);
    ref_s = t ? nx1[ref_s] : nx0[ref_s];
    #1 check_now();
  endtask

  localparam string PATTERN = "1011000100010000110001000010001000110011";

  initial begin
    int nseen;
    ref_s = 0;
    #1 trst_n = 0;           // an edge, so the asynchronous reset acts
    #1 check_now();          // TRSTN low: Test-Logic-Reset
    #20 trst_n = 1;
    for (int i = 0; i < PATTERN.len(); i++) step(PATTERN[i] == "1");
    repeat (400) step($urandom_range(0, 1));
    // five TMS-high clocks reach Test-Logic-Reset from every state
    for (int s = 0; s < 16; s++) begin
      int guard = 0;
      while (ref_s != s && guard < 200) begin step($urandom_range(0, 1)); guard++; end
      repeat (5) step(1);
      checks++;
      if (state !== TLR) begin failures++; $display("FAIL no reset from %0d", s); end
    end
    // asynchronous TRSTN in the middle of a cycle
    step(0); step(1); step(0); step(0);
    #2 trst_n = 0;
    #1 ref_s = 0;
    check_now();
    #3 trst_n = 1;
    nseen = 0;
    foreach (seen[i]) nseen += seen[i];
    checks++;
    if (nseen != 16) begin failures++; $display("FAIL only %0d states visited", nseen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
