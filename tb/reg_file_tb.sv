// reg_file_tb: checks the register file against a shadow array.
// Random writes with random LD, random read addresses on both ports; reads
// are combinational, writes take effect at the clock edge, reset clears all.
// A second instance in the four-register size of the lecture's drawing is
// checked with distinct values in every register.
module reg_file_tb;
  localparam int unsigned DW = 8, AW = 3, NR = 8;
  logic clk = 0, rst, ld;
  logic [AW-1:0] sa, sb, dr;
  logic [DW-1:0] d_in, data_a, data_b;
  logic [DW-1:0] shadow [NR];
  int checks = 0, failures = 0;

  reg_file #(.DATA_W(DW), .ADDR_W(AW)) dut (.*);

  // four-register instance
  logic ld4;
  logic [1:0] sa4, sb4, dr4;
  logic [DW-1:0] d4, a4, b4;
  reg_file #(.DATA_W(DW), .ADDR_W(2)) dut4 (
    .clk(clk), .rst(rst), .ld(ld4), .sa(sa4), .sb(sb4), .dr(dr4), .d_in(d4),
    .data_a(a4), .data_b(b4));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads();
    for (int i = 0; i < NR; i++) begin
      sa = AW'(i); sb = AW'(NR-1-i); #1;
      checks++;
      if (data_a !== shadow[i] || data_b !== shadow[NR-1-i]) begin
        failures++;
        $display("read mismatch at %0d: A=%h exp %h, B=%h exp %h", i, data_a, shadow[i], data_b, shadow[NR-1-i]);
      end
    end
  endtask

  initial begin
    rst = 1; ld = 0; sa = 0; sb = 0; dr = 0; d_in = 0;
    ld4 = 0; sa4 = 0; sb4 = 0; dr4 = 0; d4 = 0;
    @(posedge clk); #1 rst = 0;
    // four-register file: R(i) = 0x30 + i, read on both ports
    for (int i = 0; i < 4; i++) begin
      ld4 = 1; dr4 = 2'(i); d4 = DW'(8'h30 + i);
      @(posedge clk); #1;
    end
    ld4 = 0;
    for (int i = 0; i < 4; i++) begin
      sa4 = 2'(i); sb4 = 2'(3 - i); #1;
      checks++;
      if (a4 !== DW'(8'h30 + i) || b4 !== DW'(8'h33 - i)) begin
        failures++;
        $display("4-register file: A=%h B=%h at %0d", a4, b4, i);
      end
    end
    for (int i = 0; i < NR; i++) shadow[i] = '0;
    check_reads();
    // each register loaded with a distinct value
    for (int i = 0; i < NR; i++) begin
      ld = 1; dr = AW'(i); d_in = DW'(8'h11 * (i + 1));
      @(posedge clk); #1;
      shadow[i] = DW'(8'h11 * (i + 1));
    end
    ld = 0;
    check_reads();
    // random traffic
    for (int t = 0; t < 300; t++) begin
      ld = 1'($urandom); dr = AW'($urandom); d_in = DW'($urandom);
      sa = AW'($urandom); sb = AW'($urandom);
      #1;
      checks++;
      if (data_a !== shadow[sa] || data_b !== shadow[sb]) begin
        failures++;
        $display("random read mismatch t=%0d", t);
      end
      @(posedge clk);
      if (ld) shadow[dr] = d_in;
      #1;
    end
    ld = 0;
    check_reads();
    // reset clears everything
    rst = 1; @(posedge clk); #1 rst = 0;
    for (int i = 0; i < NR; i++) shadow[i] = '0;
    check_reads();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
