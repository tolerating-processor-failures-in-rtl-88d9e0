// rrf: redundant register file holding the architectural registers and a
// one-deep checkpoint of them.
//
// Each register has a working copy and a shadow copy (the shadow cell added to
// every bit of the architectural register file). `ckpt` flash-copies all working
// registers into the shadow in one cycle; the copy includes a register write of
// the same cycle. `restore` flash-copies the shadow back into the working
// registers in one cycle. One write port and one read port serve the core; a
// second read port (`sh_idx`/`sh_data`) reads the shadow so the checkpoint can be
// sent to the partner core during recovery.
// From the source design: the shadow cell per bit and the single-cycle flash
// copy. Own choices: 32 registers of 64 bits, one port of each kind, reset to
// zero.
module rrf #(
  parameter int unsigned NREGS = 32,
  parameter int unsigned REG_W = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     wr_en,
  input  logic [$clog2(NREGS)-1:0] wr_idx,
  input  logic [REG_W-1:0]         wr_data,
  input  logic [$clog2(NREGS)-1:0] rd_idx,
  output logic [REG_W-1:0]         rd_data,
  input  logic                     ckpt,
  input  logic                     restore,
  input  logic [$clog2(NREGS)-1:0] sh_idx,
  output logic [REG_W-1:0]         sh_data
);
  logic [REG_W-1:0] work   [NREGS];
  logic [REG_W-1:0] shadow [NREGS];
  logic [REG_W-1:0] work_nxt [NREGS];

  always_comb begin
    for (int i = 0; i < NREGS; i++) begin
      work_nxt[i] = work[i];
      if (wr_en && (wr_idx == $clog2(NREGS)'(i))) work_nxt[i] = wr_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < NREGS; i++) begin
        work[i]   <= '0;
        shadow[i] <= '0;
      end
    end else if (restore) begin
      for (int i = 0; i < NREGS; i++) work[i] <= shadow[i];
    end else begin
      for (int i = 0; i < NREGS; i++) begin
        work[i] <= work_nxt[i];
        if (ckpt) shadow[i] <= work_nxt[i];
      end
    end
  end

  assign rd_data = work[rd_idx];
  assign sh_data = shadow[sh_idx];
endmodule
