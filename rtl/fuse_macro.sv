// fuse_macro: fuse register, fuse controller and e-fuse box that keep the
// repair signature across power cycles and feed the RAM's repair registers.
//
// The fuse register (WORDS x WIDTH bits) moves data between the fuse box and
// the repair registers. Words 0..2 hold the repair signature:
// word 0 = {RAE, RRA, CAE, CRA}, word 1 = the bitmap row entries and word 2
// = the bitmap column entries, each {valid, address}. row_addr/row_en and
// col_addr/col_en, the values for the RRA/RAE and CRA/CAE repair registers,
// are taken from word 0 and are copied into those registers (repair_regs)
// when restore_done or sig_loaded pulses; sig_out gives the whole signature.
//
// The fuse controller does three things:
//   - restore: after reset it clears the register and then copies the fuse
//     box into it, one word per clock (WORDS clocks). It then pulses
//     restore_done for one clock; restoring is high until then.
//   - load: sig_load writes sig_in into words 0..2 in one clock; sig_loaded
//     pulses in the next clock, when the new words are visible.
//   - program: prog_start blows the register into the fuse box, one word
//     per clock. A second pass then reads every word back. After that
//     prog_done goes high, with prog_ok = 1 when the box matched the
//     register. prog_done stays high until the next prog_start.
// The addr/wr_en/wr_data/rd_en/read_data port (read_data one clock after
// rd_en) gives direct access to the register, as the external port of the
// macro; a sig_load in the same clock takes priority over wr_en.
//
// The paper gives the fuse register's role between fuse box and repair
// registers, the e-fuse, a fuse controller for programming, restore at
// power-on and the port names. The signature packing, the word-serial
// programming and the read-back check are this design's choices.
module fuse_macro #(
  parameter int WORDS = bisr_pkg::FUSE_WORDS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int FAW  = $clog2(WORDS),
  localparam int AW   = bisr_pkg::AW,
  localparam int BW   = bisr_pkg::BW,
  localparam int SW   = bisr_pkg::SIG_WORDS
) (
  input  logic             clk,
  input  logic             reset,
  // direct access to the fuse register
  input  logic [FAW-1:0]   addr,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] read_data,
  // repair signature in and out
  input  logic             sig_load,
  input  bisr_pkg::repair_sig_t sig_in,
  output bisr_pkg::repair_sig_t sig_out,
  // fuse controller
  input  logic             prog_start,
  output logic             prog_done,
  output logic             prog_ok,
  output logic             restoring,
  output logic             restore_done,
  output logic             sig_loaded,
  // repair registers
  output logic [AW-1:0]    row_addr,
  output logic [BW-1:0]    col_addr,
  output logic             row_en,
  output logic             col_en
);
  typedef enum logic [1:0] {F_RESTORE, F_IDLE, F_PROG, F_VERIFY} fstate_t;

  logic [WIDTH-1:0] fuse_reg [WORDS];
  fstate_t          state;
  logic [FAW-1:0]   cnt;
  logic             match_all;
  logic [WIDTH-1:0] box_rd;
  logic [SW-1:0][WIDTH-1:0] sig_words;
  logic [SW-1:0][WIDTH-1:0] sig_in_words;

  efuse_box #(.WORDS(WORDS), .WIDTH(WIDTH)) u_box (
    .clk(clk), .prog(state == F_PROG && !reset), .prog_addr(cnt), .prog_data(fuse_reg[cnt]),
    .rd_addr(cnt), .rd_data(box_rd)
  );

  always_comb begin
    for (int w = 0; w < SW; w++) sig_words[w] = fuse_reg[w];
    sig_out      = bisr_pkg::sig_unpack(sig_words);
    sig_in_words = bisr_pkg::sig_pack(sig_in);
  end

  assign row_en    = sig_out.rae;
  assign row_addr  = sig_out.rra;
  assign col_en    = sig_out.cae;
  assign col_addr  = sig_out.cra;
  assign restoring = (state == F_RESTORE);

  always_ff @(posedge clk) begin
    restore_done <= 1'b0;
    sig_loaded   <= 1'b0;
    if (reset) begin
      for (int w = 0; w < WORDS; w++) fuse_reg[w] <= '0;
      state     <= F_RESTORE;
      cnt       <= '0;
      prog_done <= 1'b0;
      prog_ok   <= 1'b0;
      match_all <= 1'b1;
    end else begin
      case (state)
        F_RESTORE: begin
          fuse_reg[cnt] <= box_rd;
          cnt           <= cnt + FAW'(1);
          if (cnt == FAW'(WORDS-1)) begin
            state        <= F_IDLE;
            restore_done <= 1'b1;
          end
        end
        F_IDLE: begin
          if (sig_load) begin
            for (int w = 0; w < SW; w++) fuse_reg[w] <= sig_in_words[w];
            sig_loaded <= 1'b1;
          end else if (wr_en) begin
            fuse_reg[addr] <= wr_data;
          end
          if (prog_start) begin
            state     <= F_PROG;
            cnt       <= '0;
            prog_done <= 1'b0;
            prog_ok   <= 1'b0;
            match_all <= 1'b1;
          end
        end
        F_PROG: begin
          cnt <= cnt + FAW'(1);
          if (cnt == FAW'(WORDS-1)) state <= F_VERIFY;
        end
        default: begin  // F_VERIFY
          cnt <= cnt + FAW'(1);
          if (box_rd != fuse_reg[cnt]) match_all <= 1'b0;
          if (cnt == FAW'(WORDS-1)) begin
            state     <= F_IDLE;
            prog_done <= 1'b1;
            prog_ok   <= match_all && (box_rd == fuse_reg[cnt]);
          end
        end
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) read_data <= fuse_reg[addr];
  end
endmodule
