// Testbench for rrf: random writes, checkpoints and restores against two
// reference arrays. A checkpoint copies the register file including the
// same-cycle write; a restore copies the shadow back and drops that write.
// Both read ports are checked every cycle.
module tb_rrf;
  localparam int unsigned NREGS = 8, REG_W = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, nrest = 0;

  logic wr_en = 1'b0, ckpt = 1'b0, restore = 1'b0;
  logic [$clog2(NREGS)-1:0] wr_idx = '0, rd_idx = '0, sh_idx = '0;
  logic [REG_W-1:0] wr_data = '0, rd_data, sh_data;
  logic [REG_W-1:0] w [NREGS], s [NREGS];

  rrf #(.NREGS(NREGS), .REG_W(REG_W)) dut (
    .clk, .rst_n, .wr_en, .wr_idx, .wr_data, .rd_idx, .rd_data, .ckpt, .restore, .sh_idx, .sh_data
  );

  always @(negedge clk) begin
    wr_en   <= ($urandom % 2) == 0;
    wr_idx  <= $urandom;
    wr_data <= $urandom;
    rd_idx  <= $urandom;
    sh_idx  <= $urandom;
    ckpt    <= ($urandom % 10) == 0;
    restore <= ($urandom % 25) == 0;
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin w[i] = '0; s[i] = '0; end
    end else begin
      checks += 2;
      if (rd_data !== w[rd_idx]) begin failures++; $display("FAIL rd[%0d]=%h expected %h", rd_idx, rd_data, w[rd_idx]); end
      if (sh_data !== s[sh_idx]) begin failures++; $display("FAIL sh[%0d]=%h expected %h", sh_idx, sh_data, s[sh_idx]); end
      if (restore) begin
        for (int i = 0; i < NREGS; i++) w[i] = s[i];
        nrest++;
      end else begin
        if (wr_en) w[wr_idx] = wr_data;
        if (ckpt) for (int i = 0; i < NREGS; i++) s[i] = w[i];
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (3000) @(posedge clk);
    checks++;
    if (nrest == 0) begin failures++; $display("FAIL no restore"); end
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
