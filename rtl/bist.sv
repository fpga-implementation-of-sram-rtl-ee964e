// bist: built-in self-test controller. It tests the RAM with a four-element
// march and reports each faulty word to the redundancy analyser.
//
// The march is {up(w P); up(r P); up(w ~P); up(r ~P)} with P = 0x55. Each
// element walks all addresses in the order of the bist_lfsr generator. A
// write takes one clock. A read takes two: the RAM is read, then the returned
// word is compared with the expected one. A non-zero syndrome (expected XOR
// read) sets fail and is offered to the analyser as faulty address fa and
// syndrome syn with flt_valid. The test stalls until flt_ready accepts it.
// A pulse on start runs the test. lfsr_done stays high from the end of the
// test until the next start. Without faults the march takes
// 2*ROWS write clocks and 2*2*ROWS read clocks (48 for 8 words), so
// lfsr_done rises 49 clocks after the clock that samples start; every fault
// report adds one clock, and every clock the report waits adds one more.
//
// The paper gives the BIST's role (test patterns, LFSR addresses, FA and
// syndrome to the BIRA) and the syndrome definition. The march algorithm,
// the data background and the valid/ready report handshake are this
// design's choices.
module bist
#(
  parameter int ROWS  = bisr_pkg::ROWS,
  parameter int WIDTH = bisr_pkg::WIDTH,
  localparam int AW   = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             reset,
  input  logic             start,
  // RAM access
  output logic             wr_en,
  output logic             rd_en,
  output logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] wdata,
  input  logic [WIDTH-1:0] rdata,
  // fault reports to the BIRA
  output logic             flt_valid,
  input  logic             flt_ready,
  output logic [AW-1:0]    fa,
  output logic [WIDTH-1:0] syn,
  // status
  output logic             lfsr_done,
  output logic             fail
);
  localparam logic [WIDTH-1:0] PAT = WIDTH'({(WIDTH+1)/2{2'b01}});

  bisr_pkg::bist_state_t   state;
  logic [1:0]    elem;        // 0: w P, 1: r P, 2: w ~P, 3: r ~P
  logic          lfsr_start, lfsr_hold, lfsr_last;
  logic [AW-1:0] lfsr_addr;
  logic [WIDTH-1:0] expect_d;
  logic          step;        // current address finished

  bist_lfsr #(.AW(AW)) u_lfsr (
    .clk(clk), .reset(reset), .start(lfsr_start), .done(lfsr_hold),
    .lfsr_out(lfsr_addr), .last(lfsr_last)
  );

  assign expect_d = elem[1] ? ~PAT : PAT;
  assign addr     = lfsr_addr;
  assign wdata    = expect_d;
  assign wr_en    = (state == bisr_pkg::BIST_WRITE);
  assign rd_en    = (state == bisr_pkg::BIST_RD_ISSUE);
  assign flt_valid = (state == bisr_pkg::BIST_REPORT);
  assign lfsr_done = (state == bisr_pkg::BIST_DONE);

  always_comb begin
    step = 1'b0;
    case (state)
      bisr_pkg::BIST_WRITE:    step = 1'b1;
      bisr_pkg::BIST_RD_CHECK: step = ((rdata ^ expect_d) == '0);
      bisr_pkg::BIST_REPORT:   step = flt_ready;
      default:       step = 1'b0;
    endcase
    lfsr_start = start || (step && lfsr_last);
    lfsr_hold  = !(step && !lfsr_last);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= bisr_pkg::BIST_IDLE;
      elem  <= '0;
      fail  <= 1'b0;
      fa    <= '0;
      syn   <= '0;
    end else if (start) begin
      state <= bisr_pkg::BIST_WRITE;
      elem  <= '0;
      fail  <= 1'b0;
    end else begin
      if (state == bisr_pkg::BIST_RD_CHECK && (rdata ^ expect_d) != '0) begin
        fail  <= 1'b1;
        fa    <= lfsr_addr;
        syn   <= rdata ^ expect_d;
        state <= bisr_pkg::BIST_REPORT;
      end else if (state == bisr_pkg::BIST_RD_ISSUE) begin
        state <= bisr_pkg::BIST_RD_CHECK;
      end else if (step) begin
        if (lfsr_last) begin
          elem  <= elem + 2'd1;
          state <= (elem == 2'd3) ? bisr_pkg::BIST_DONE : (elem[0] ? bisr_pkg::BIST_WRITE : bisr_pkg::BIST_RD_ISSUE);
        end else begin
          state <= elem[0] ? bisr_pkg::BIST_RD_ISSUE : bisr_pkg::BIST_WRITE;
        end
      end
    end
  end

  // A fault report is held steady until it is accepted.
  property p_report_stable;
    @(posedge clk) disable iff (reset || start)
      flt_valid && !flt_ready |=> flt_valid && $stable(fa) && $stable(syn);
  endproperty
  assert property (p_report_stable);
endmodule
