// prog_cpu_tb: the programmable processor running both ROM programs.
//   Multiplication program: operands placed in M[0], M[1] under reset; after
//   release, M[2] must equal A * B mod 256 when the PC first reaches word 11,
//   after 4 + sum over passes (5 + multiplier bit) + 1 cycles, with one pass
//   per bit of B up to its highest 1 (one pass when B = 0). The PC trace is
//   checked against a model of the program's control flow.
//   Example program (a second instance): R2 <= R0 + R1, R1 <= M[R2],
//   M[R2] <= R0, R3 <= R0 + 3, starting from cleared registers, so M[0]
//   receives R0 = 0 and the read of M[0] lands in R1.
module prog_cpu_tb;
  import sc_pkg::*;
  logic clk = 0, rst;
  logic [3:0] pc;
  ctrl_word_t cw;
  logic mp;
  flags_t flags;
  logic host_we;
  logic [7:0] host_addr, host_wdata, host_rdata;
  int checks = 0, failures = 0;

  prog_cpu #(.PROGRAM(PROG_MULT)) dut (.*);

  // second instance with the example program
  logic ex_rst;
  logic [3:0] ex_pc;
  ctrl_word_t ex_cw;
  logic ex_mp;
  flags_t ex_flags;
  logic ex_host_we;
  logic [7:0] ex_host_addr, ex_host_wdata, ex_host_rdata;

  prog_cpu #(.PROGRAM(PROG_EXAMPLE)) ex (
    .clk(clk), .rst(ex_rst), .pc(ex_pc), .cw(ex_cw), .mp(ex_mp), .flags(ex_flags),
    .host_we(ex_host_we), .host_addr(ex_host_addr), .host_wdata(ex_host_wdata),
    .host_rdata(ex_host_rdata));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int exp_cycles(logic [7:0] b);
    int n = 4 + 1;
    int passes = 1;
    for (int i = 0; i < 8; i++) if (b[i]) passes = i + 1;
    for (int i = 0; i < passes; i++) n += 5 + int'(b[i]);
    return n;
  endfunction

  task automatic hwrite(logic [7:0] a, logic [7:0] d);
    host_we = 1; host_addr = a; host_wdata = d;
    @(posedge clk); #1 host_we = 0;
  endtask

  task automatic run(logic [7:0] a, logic [7:0] b);
    int cyc = 0;
    int epc = 0;
    logic [7:0] r2;   // model of the multiplier register
    logic [7:0] r4;
    rst = 1;
    hwrite(8'd0, a);
    hwrite(8'd1, b);
    hwrite(8'd2, 8'hEE);
    #1 rst = 0;
    r2 = b; r4 = 0;
    while (pc != 4'd11 && cyc < 200) begin
      checks++;
      if (pc !== 4'(epc)) begin
        failures++;
        $display("%0d * %0d: pc=%0d expected %0d at cycle %0d", a, b, pc, epc, cyc);
      end
      case (epc)
        4: begin r4 = r2 & 8'd1; epc = 5; end
        5: epc = (r4 == 0) ? 7 : 6;
        8: begin r2 = r2 >> 1; epc = 9; end
        9: epc = (r2 != 0) ? 4 : 10;
        default: epc = epc + 1;
      endcase
      @(posedge clk); #1 cyc++;
    end
    host_addr = 8'd2; #1;
    checks++;
    if (host_rdata !== 8'(a * b)) begin
      failures++;
      $display("%0d * %0d: M[2]=%0d exp %0d", a, b, host_rdata, 8'(a * b));
    end
    checks++;
    if (cyc != exp_cycles(b)) begin
      failures++;
      $display("%0d * %0d: %0d cycles, expected %0d", a, b, cyc, exp_cycles(b));
    end
  endtask

  initial begin
    rst = 1; host_we = 0; host_addr = 0; host_wdata = 0;
    ex_rst = 1; ex_host_we = 0; ex_host_addr = 0; ex_host_wdata = 0;
    // example program: M[0] = 8'h3C beforehand
    ex_host_we = 1; ex_host_addr = 0; ex_host_wdata = 8'h3C;
    @(posedge clk); #1 ex_host_we = 0; ex_rst = 0;
    // words 0..3 execute in the next four cycles; check each write-back
    // through the ALU result of word 3 (R3 <= R0 + 3 = 3) and the memory
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (ex_pc !== 4'd3 || ex_cw.dr !== 3'd3) failures++;
    @(posedge clk); #1;
    ex_host_addr = 0; #1;
    checks++;
    if (ex_host_rdata !== 8'h00) begin
      failures++;
      $display("example: M[0]=%h expected 00 (R0 stored to M[R2])", ex_host_rdata);
    end
    ex_rst = 1;

    run(8'd5, 8'd3);     // the lecture's 3-bit case
    run(8'd7, 8'd7);
    run(8'd6, 8'd0);
    run(8'd0, 8'd5);
    run(8'd255, 8'd255);
    run(8'd3, 8'd128);
    for (int t = 0; t < 60; t++) run(8'($urandom), 8'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
