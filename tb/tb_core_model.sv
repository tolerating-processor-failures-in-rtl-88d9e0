// tb_core_model: behavioural stand-in for one processor core and its cache,
// used by the pair testbench. Not synthesizable design content.
//
// The core's whole architectural state is register 0 of the node controller's
// register file: {pc, acc}. In every cycle with core_run high it executes one
// instruction: pc+1, acc mixed with pc and any input delivered that cycle,
// written back as a retirement. Some instructions store to a block of a small
// cache model (the previous line goes to the checkpoint log) or emit an output
// whose kind follows from pc. Rolling the register back therefore rolls the
// program back. `err_state` corrupts the retired value once, `err_out` the
// output data once, to model soft errors.
module tb_core_model
  import lacross_pkg::*;
#(
  parameter int unsigned LINE_W = 512,
  parameter int unsigned NBLK   = 256
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              core_run,
  input  logic              in_valid,
  input  ext_in_t           in_data,
  input  logic [63:0]       rd_data,
  output logic              ret_valid,
  output logic [63:0]       ret_data,
  output logic              st_valid,
  output logic [BLK_W-1:0]  st_blk,
  output logic [LINE_W-1:0] st_old_line,
  input  logic              undo_valid,
  input  logic [BLK_W-1:0]  undo_blk,
  input  logic [LINE_W-1:0] undo_line,
  output logic              out_valid,
  output out_msg_t          out_msg,
  input  logic              wide_stores,  // store to many distinct blocks
  input  logic              err_state,
  input  logic              err_out
);
  logic [LINE_W-1:0] cache [NBLK];
  logic [31:0] pc, acc, npc, nacc;
  logic [BLK_W-1:0] last_blk;

  initial for (int i = 0; i < NBLK; i++) cache[i] = '0;
  initial last_blk = '0;

  assign pc   = rd_data[63:32];
  assign acc  = rd_data[31:0];
  assign npc  = pc + 1;
  assign nacc = (acc * 32'd1103515245) + pc + (in_valid ? in_data.payload[31:0] ^ in_data.payload[63:32] : 32'd0);

  always_comb begin
    ret_valid = core_run;
    ret_data  = {npc, nacc} ^ {63'd0, err_state};
    st_valid  = core_run && (pc % 5 == 2);
    st_blk    = wide_stores ? BLK_W'(64 + (pc % 32'd190)) : BLK_W'((pc * 7) % 32'd8);
    st_old_line = cache[st_blk[7:0]];
    out_valid = core_run && (pc % 31 == 17);
    out_msg   = '0;
    out_msg.data = {32'd0, nacc ^ {31'd0, err_out}};
    case ((pc / 31) % 6)
      0: begin out_msg.cls = OUT_READ_SHARED; out_msg.blk = BLK_W'(300 + pc % 32'd50); end
      1: begin out_msg.cls = OUT_READ_EXCL;   out_msg.blk = BLK_W'(300 + pc % 32'd50); end
      2: begin out_msg.cls = OUT_DIRTY_REPLY; out_msg.blk = last_blk; end           // recently written
      3: begin out_msg.cls = OUT_IO;          out_msg.blk = BLK_W'(400); end
      4: begin out_msg.cls = OUT_DIRTY_REPLY; out_msg.blk = BLK_W'(200 + pc % 32'd20); end // never written
      default: begin out_msg.cls = OUT_OTHER; out_msg.blk = BLK_W'(pc % 32'd8); end
    endcase
  end

  always @(posedge clk) begin
    if (!rst_n) ;
    else if (undo_valid) cache[undo_blk[7:0]] <= undo_line;
    else if (st_valid) begin
      cache[st_blk[7:0]] <= {(LINE_W/32){nacc}};
      last_blk <= st_blk;
    end
  end
endmodule
