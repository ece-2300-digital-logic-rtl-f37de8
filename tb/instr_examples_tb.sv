// instr_examples_tb: the single instructions used to introduce the datapath,
// each issued as one control word and checked one cycle later:
//   ADD R0, R1, R2      SUB R3, R2, R1      SUB R3, R0, R3
//   ADDI R1, R1, 1      LOAD R3, 4(R1)      STORE R2, 0(R0)
// plus an ADDI with a negative immediate to exercise sign extension.
// Register values are read back through the ALU as R + 0.
module instr_examples_tb;
  import sc_pkg::*;
  logic clk = 0, rst;
  ctrl_word_t cw;
  flags_t flags;
  logic [7:0] alu_y, wb_data;
  logic host_we;
  logic [7:0] host_addr, host_wdata, host_rdata;
  int checks = 0, failures = 0;

  datapath dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic exec(ctrl_word_t w);
    cw = w; @(posedge clk); #1 cw = CW_NOP;
  endtask

  // R[dr] <= R[sa] op R[sb]
  function automatic ctrl_word_t rr(logic [2:0] dr, logic [2:0] sa, logic [2:0] sb, fs_e fs);
    return make_cw(dr, sa, sb, 4'd0, 1'b0, fs, 1'b0, 1'b1, 1'b0);
  endfunction

  function automatic ctrl_word_t ri(logic [2:0] dr, logic [2:0] sa, logic [3:0] imm);
    return make_cw(dr, sa, 3'd0, imm, 1'b1, FS_ADD, 1'b0, 1'b1, 1'b0);
  endfunction

  task automatic expect_reg(logic [2:0] r, logic [7:0] v, string what);
    cw = make_cw(3'd0, r, 3'd0, 4'd0, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b0);
    #1;
    checks++;
    if (alu_y !== v) begin
      failures++;
      $display("%s: R%0d = %0d, expected %0d", what, r, alu_y, v);
    end
    cw = CW_NOP;
  endtask

  task automatic hwrite(logic [7:0] a, logic [7:0] d);
    host_we = 1; host_addr = a; host_wdata = d;
    @(posedge clk); #1 host_we = 0;
  endtask

  initial begin
    rst = 1; cw = CW_NOP; host_we = 0; host_addr = 0; host_wdata = 0;
    @(posedge clk); #1 rst = 0;
    // R1 = 7, R2 = 3 via immediates
    exec(ri(3'd1, 3'd1, 4'd7));
    exec(ri(3'd2, 3'd2, 4'd3));
    exec(rr(3'd0, 3'd1, 3'd2, FS_ADD));             // ADD R0, R1, R2
    expect_reg(3'd0, 8'd10, "ADD R0, R1, R2");
    exec(rr(3'd3, 3'd2, 3'd1, FS_SUB));             // SUB R3, R2, R1
    expect_reg(3'd3, 8'hFC, "SUB R3, R2, R1");
    exec(rr(3'd3, 3'd0, 3'd3, FS_SUB));             // SUB R3, R0, R3
    expect_reg(3'd3, 8'd14, "SUB R3, R0, R3");
    exec(ri(3'd1, 3'd1, 4'd1));                     // ADDI R1, R1, 1
    expect_reg(3'd1, 8'd8, "ADDI R1, R1, 1");
    exec(ri(3'd1, 3'd1, 4'b1110));                  // ADDI R1, R1, -2
    expect_reg(3'd1, 8'd6, "ADDI R1, R1, -2");
    hwrite(8'd10, 8'hA5);
    exec(make_cw(3'd3, 3'd1, 3'd0, 4'd4, 1'b1, FS_ADD, 1'b1, 1'b1, 1'b0));  // LOAD R3, 4(R1)
    expect_reg(3'd3, 8'hA5, "LOAD R3, 4(R1)");
    exec(make_cw(3'd0, 3'd0, 3'd2, 4'd0, 1'b1, FS_ADD, 1'b0, 1'b0, 1'b1));  // STORE R2, 0(R0)
    host_addr = 8'd10; #1;
    checks++;
    if (host_rdata !== 8'd3) begin failures++; $display("STORE R2, 0(R0): M[10] = %0d", host_rdata); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
