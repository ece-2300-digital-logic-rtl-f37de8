// data_ram_tb: random writes and reads on both ports of the data memory
// against a shadow array; reads are combinational, writes land at the edge,
// and the processor port wins a same-address write collision.
module data_ram_tb;
  logic clk = 0;
  logic we, host_we;
  logic [7:0] addr, host_addr, wdata, host_wdata, rdata, host_rdata;
  logic [7:0] shadow [256];
  int checks = 0, failures = 0;

  data_ram #(.DATA_W(8), .ADDR_W(8)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; host_we = 0; addr = 0; host_addr = 0; wdata = 0; host_wdata = 0;
    // fill through the host port
    for (int i = 0; i < 256; i++) begin
      host_we = 1; host_addr = 8'(i); host_wdata = 8'(i * 7 + 3);
      @(posedge clk); #1;
      shadow[i] = 8'(i * 7 + 3);
    end
    host_we = 0;
    for (int i = 0; i < 256; i++) begin
      addr = 8'(i); host_addr = 8'(255 - i); #1;
      checks++;
      if (rdata !== shadow[i] || host_rdata !== shadow[255 - i]) failures++;
    end
    // random traffic on both ports
    for (int t = 0; t < 1000; t++) begin
      we = 1'($urandom); host_we = 1'($urandom);
      addr = 8'($urandom_range(0, 15)); host_addr = 8'($urandom_range(0, 15));
      wdata = 8'($urandom); host_wdata = 8'($urandom);
      #1;
      checks++;
      if (rdata !== shadow[addr] || host_rdata !== shadow[host_addr]) begin
        failures++;
        $display("read mismatch t=%0d", t);
      end
      @(posedge clk);
      if (host_we) shadow[host_addr] = host_wdata;
      if (we) shadow[addr] = wdata;
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
