// Testbench for fingerprint_gen: random update words and snapshots against a
// bit-serial CRC-16 (polynomial 0x1021, preset 0xFFFF, MSB first) written
// here independently. Checks fp_now every cycle and fp/fp_valid one cycle
// after each snap; restart reseeds the CRC.
module tb_fingerprint_gen;
  import lacross_pkg::*;
  localparam int unsigned DATA_W = 64;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nsnap = 0;

  logic restart = 1'b0, upd_valid = 1'b0, snap = 1'b0, fp_valid;
  logic [DATA_W-1:0] upd_data = '0;
  logic [FP_W-1:0] fp, fp_now;
  logic [15:0] crc = 16'hFFFF, now, last_fp = '0;
  logic last_valid = 1'b0;

  fingerprint_gen #(.DATA_W(DATA_W)) dut (
    .clk, .rst_n, .restart, .upd_valid, .upd_data, .snap, .fp_valid, .fp, .fp_now
  );

  function automatic logic [15:0] crc_word(input logic [15:0] c, input logic [DATA_W-1:0] d);
    logic fb;
    for (int i = DATA_W - 1; i >= 0; i--) begin
      fb = c[15] ^ d[i];
      c  = c << 1;
      if (fb) c = c ^ 16'h1021;
    end
    return c;
  endfunction

  always @(negedge clk) begin
    restart   <= ($urandom % 300) == 0;
    upd_valid <= ($urandom % 2) == 0;
    upd_data  <= {$urandom, $urandom};
    snap      <= ($urandom % 9) == 0;
  end

  always @(posedge clk) if (rst_n) begin
    now = upd_valid ? crc_word(crc, upd_data) : crc;
    checks += 2;
    if (fp_now !== now) begin failures++; $display("FAIL fp_now=%h expected %h", fp_now, now); end
    if (fp_valid !== last_valid || (last_valid && fp !== last_fp)) begin
      failures++; $display("FAIL fp_valid=%0d/%0d fp=%h/%h", fp_valid, last_valid, fp, last_fp);
    end
    if (restart) begin crc = 16'hFFFF; last_valid = 1'b0; last_fp = '0; end
    else begin
      last_valid = snap;
      if (snap) begin last_fp = now; crc = 16'hFFFF; nsnap++; end
      else crc = now;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (4000) @(posedge clk);
    checks++;
    if (nsnap < 100) begin failures++; $display("FAIL too few snapshots"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
