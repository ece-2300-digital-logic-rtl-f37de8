// datapath_tb: runs the four-word example sequence (R2 <= R0 + R1,
// R1 <= M[R2], M[R2] <= R0, R3 <= R0 + 3) and then random control words,
// comparing the ALU result, condition codes and write-back value of every
// cycle with a reference model of registers and memory kept here.
module datapath_tb;
  import sc_pkg::*;
  logic clk = 0, rst;
  ctrl_word_t cw;
  flags_t flags;
  logic [7:0] alu_y, wb_data;
  logic host_we;
  logic [7:0] host_addr, host_wdata, host_rdata;
  logic [7:0] mr [8];
  logic [7:0] mm [256];
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle of the reference model; checks outputs before the edge
  task automatic step(ctrl_word_t w);
    logic [7:0] a, b, y, wb, sbv;
    logic [8:0] s;
    logic c, v;
    cw = w;
    a = mr[w.sa];
    b = w.mb ? {{4{w.imm[3]}}, w.imm} : mr[w.sb];
    c = 0; v = 0;
    case (w.fs)
      FS_ADD: begin s = {1'b0, a} + {1'b0, b}; y = s[7:0]; c = s[8];
                    v = (a[7] & b[7] & ~y[7]) | (~a[7] & ~b[7] & y[7]); end
      FS_SUB: begin s = {1'b0, a} - {1'b0, b}; y = s[7:0]; c = (a >= b);
                    v = (a[7] & ~b[7] & ~y[7]) | (~a[7] & b[7] & y[7]); end
      FS_AND: y = a & b;
      FS_SLL: y = a << 1;
      FS_SRL: y = a >> 1;
      default: y = 0;
    endcase
    wb = w.md ? mm[y] : y;
    #1;
    checks++;
    if (alu_y !== y || wb_data !== wb || flags.z !== (y == 0) || flags.n !== y[7] ||
        flags.c !== c || flags.v !== v) begin
      failures++;
      $display("cw=%p: y=%h exp %h wb=%h exp %h flags=%b exp c=%b v=%b", w, alu_y, y, wb_data, wb, flags, c, v);
    end
    sbv = mr[w.sb];
    @(posedge clk);
    if (w.ld) mr[w.dr] = wb;
    if (w.mw) mm[y] = sbv;
    #1;
  endtask

  initial begin
    ctrl_word_t w;
    rst = 1; host_we = 0; host_addr = 0; host_wdata = 0; cw = CW_NOP;
    @(posedge clk); #1 rst = 0;
    for (int i = 0; i < 8; i++) mr[i] = 0;
    // memory contents
    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_addr = 8'(i); host_wdata = 8'(i ^ 8'h5A);
      @(posedge clk); #1;
      mm[i] = 8'(i ^ 8'h5A);
    end
    host_we = 0;
    // R0 = 5, R1 = 9 via immediates (R0 <= R0 + 5, R1 <= R1 + ... )
    step(make_cw(3'd0, 3'd0, 3'd0, 4'd5, 1'b1, FS_ADD, 1'b0, 1'b1, 1'b0));
    step(make_cw(3'd1, 3'd1, 3'd0, 4'd7, 1'b1, FS_ADD, 1'b0, 1'b1, 1'b0));
    step(make_cw(3'd1, 3'd1, 3'd0, 4'd2, 1'b1, FS_ADD, 1'b0, 1'b1, 1'b0));
    // the example sequence
    for (int k = 0; k < 4; k++) step(rom_word(PROG_EXAMPLE, k));
    // R2 = 14, R1 = M[14], M[14] = 5, R3 = 8: read back via the host port
    host_addr = 8'd14; #1;
    checks++; if (host_rdata !== 8'd5) begin failures++; $display("M[14]=%h", host_rdata); end
    checks++; if (mr[2] != 8'd14 || mr[1] != (8'd14 ^ 8'h5A) || mr[3] != 8'd8) failures++;
    // random control words
    for (int t = 0; t < 3000; t++) begin
      w = ctrl_word_t'($bits(ctrl_word_t)'($urandom));
      w.fs = fs_e'($urandom_range(0, 4));
      step(w);
    end
    // read every register back through the ALU (R + 0)
    for (int i = 0; i < 8; i++)
      step(make_cw(3'd0, 3'(i), 3'd0, 4'd0, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
