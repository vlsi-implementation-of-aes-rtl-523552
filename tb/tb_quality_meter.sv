// tb_quality_meter: random block pairs (identical, LSB-only changes and
// arbitrary changes); sse, n_bytes and n_diff are compared with sums kept by
// the testbench, including after a clear.
`include "tb/tb_common.svh"
module tb_quality_meter;
  import aes_pkg::*;
  int checks = 0, failures = 0;
  logic        clk = 0, rst_n = 0, clear = 0, valid = 0;
  pix2x2_t     orig_blk, test_blk;
  logic [47:0] sse;
  logic [31:0] n_bytes, n_diff;
  longint      e_sse;
  int          e_n, e_d;

  quality_meter dut (.clk, .rst_n, .clear, .valid, .orig_blk, .test_blk, .sse, .n_bytes, .n_diff);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 2; round++) begin
      clear = 1; @(negedge clk); clear = 0;
      e_sse = 0; e_n = 0; e_d = 0;
      `CHECK(sse == 0 && n_bytes == 0 && n_diff == 0, "cleared")
      for (int i = 0; i < 300; i++) begin
        logic [95:0] a, b;
        a = {$urandom, $urandom, $urandom};
        case (i % 3)
          0: b = a;
          1: b = a ^ ({$urandom, $urandom, $urandom} & {12{8'h01}});
          default: b = {$urandom, $urandom, $urandom};
        endcase
        if (i == 5) begin a = '0; b = '1; end
        orig_blk = a; test_blk = b;
        valid = ($urandom_range(0, 3) != 0);
        if (valid) begin
          for (int k = 0; k < 12; k++) begin
            automatic int d = int'(a[8*k +: 8]) - int'(b[8*k +: 8]);
            e_sse += d * d;
            if (d != 0) e_d++;
          end
          e_n += 12;
        end
        @(negedge clk);
        valid = 0;
        `CHECK(sse == 48'(e_sse) && n_bytes == e_n && n_diff == e_d,
               $sformatf("sums %0d %0d %0d exp %0d %0d %0d", sse, n_bytes, n_diff, e_sse, e_n, e_d))
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
