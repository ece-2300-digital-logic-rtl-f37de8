// alu_tb: exhaustive check of the ALU over all 8-bit operand pairs for every
// function, against results and condition codes computed here with wider
// integer arithmetic.
module alu_tb;
  import sc_pkg::*;
  logic [7:0] a, b, y;
  fs_e fs;
  flags_t flags;
  int checks = 0, failures = 0;

  alu #(.DATA_W(8)) dut (.*);

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fs_e ops [5] = '{FS_ADD, FS_SUB, FS_AND, FS_SLL, FS_SRL};
    int sa_i, sb_i, full, sres;
    logic [7:0] ey;
    logic ec, ev;
    for (int k = 0; k < 5; k++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a = 8'(i); b = 8'(j); fs = ops[k];
          #1;
          sa_i = (i > 127) ? i - 256 : i;
          sb_i = (j > 127) ? j - 256 : j;
          ec = 0; ev = 0;
          case (k)
            0: begin full = i + j; ey = 8'(full); ec = (full > 255);
                     sres = sa_i + sb_i; ev = (sres > 127 || sres < -128); end
            1: begin full = i + (255 - j) + 1; ey = 8'(full); ec = (full > 255);
                     sres = sa_i - sb_i; ev = (sres > 127 || sres < -128); end
            2: ey = 8'(i & j);
            3: ey = 8'((i * 2) % 256);
            default: ey = 8'(i / 2);
          endcase
          checks++;
          if (y !== ey || flags.c !== ec || flags.v !== ev ||
              flags.z !== (ey == 0) || flags.n !== ey[7]) begin
            failures++;
            if (failures < 10)
              $display("fs=%0d a=%h b=%h: y=%h exp %h flags=%b exp c=%b v=%b", k, a, b, y, ey, flags, ec, ev);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
