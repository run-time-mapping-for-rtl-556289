// dnode: the coarse-grain processing element of the systolic ring.
//
// Following the Dnode figure, a Dnode is a small register file, two operand
// multiplexers, an ALU/multiplier and an accumulator whose value is the
// Dnode's output and is fed back to the multiplexers. Operand a and b are each
// chosen by the current configuration word from: the switch inputs (outputs of
// the d Dnodes of the previous layer, the head of the layer's input FIFO, the
// selected global bus), the register file, the accumulator, or zero. When go is
// high the ALU result is written to the accumulator and, if rf_we is set,
// operand a is written to rf[rf_wa]. When go is low (stalled or idle) nothing
// changes. clear zeroes the accumulator and the register file (new task).
// vld is a one-cycle token: it is high in the cycle after the Dnode executed an
// operation other than NOP, i.e. while acc holds a value its neighbours have not
// yet consumed. The switch uses it to fire the Dnodes of the next layer.
//
// The operation set (dhm_pkg::op_e), 16-bit two's-complement arithmetic with
// wrap-around (|a-b| is exact, as an unsigned value) and a product truncated to its low 16 bits are this design's
// choices; the figure gives the structure, not the encodings.
//
// Timing: result is combinational from cfg, sw_in and the registers; acc is
// registered, so a Dnode of the next layer sees it one cycle later.
module dnode
  import dhm_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  dnode_cfg_t           cfg,
  input  logic                 go,
  input  logic                 clear,
  input  logic [DW-1:0]        sw_in [N_SW_IN],
  output logic [DW-1:0]        result,
  output logic [DW-1:0]        acc,
  output logic                 vld
);
  localparam int unsigned SWAW = $clog2(N_SW_IN);

  logic [DW-1:0] rf [RF_DEPTH];
  logic [DW-1:0] opa, opb;

  function automatic logic [DW-1:0] pick(input logic [SRCW-1:0] s,
                                         input logic [DW-1:0] sw [N_SW_IN],
                                         input logic [DW-1:0] rfv,
                                         input logic [DW-1:0] accv);
    if (int'(s) < N_SW_IN) return sw[SWAW'(s)];
    else if (int'(s) == SRC_REG) return rfv;
    else if (int'(s) == SRC_ACC) return accv;
    else return '0;
  endfunction

  assign opa = pick(cfg.src_a, sw_in, rf[cfg.rf_ra], acc);
  assign opb = pick(cfg.src_b, sw_in, rf[cfg.rf_ra], acc);

  logic signed [DW-1:0]   sa, sb, diff;
  logic signed [DW:0]     wdiff, wabs;
  logic        [DW-1:0]   absd;
  logic signed [2*DW-1:0] prod;
  assign sa    = signed'(opa);
  assign sb    = signed'(opb);
  assign diff  = sa - sb;
  // |a - b| is formed on DW+1 bits so that it is exact (at most 2**DW - 1)
  assign wdiff = (DW+1)'(sa) - (DW+1)'(sb);
  assign wabs  = wdiff[DW] ? -wdiff : wdiff;
  assign absd  = wabs[DW-1:0];
  assign prod = sa * sb;

  always_comb begin
    unique case (cfg.op)
      OP_NOP:  result = acc;
      OP_PASS: result = opa;
      OP_ADD:  result = opa + opb;
      OP_SUB:  result = diff;
      OP_MUL:  result = prod[DW-1:0];
      OP_MAC:  result = acc + prod[DW-1:0];
      OP_ABSD: result = absd;
      OP_SAD:  result = acc + absd;
      OP_SHRA: result = DW'(sa >>> opb[3:0]);
      OP_AND:  result = opa & opb;
      OP_OR:   result = opa | opb;
      OP_XOR:  result = opa ^ opb;
      OP_ACC:  result = acc + opa;
      default: result = acc;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      acc <= '0;
      vld <= 1'b0;
      for (int k = 0; k < RF_DEPTH; k++) rf[k] <= '0;
    end else begin
      vld <= go && (cfg.op != OP_NOP);
      if (go) begin
        acc <= result;
        if (cfg.rf_we) rf[cfg.rf_wa] <= opa;
      end
    end
  end
endmodule
