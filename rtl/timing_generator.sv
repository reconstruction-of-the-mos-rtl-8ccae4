// timing_generator: Mealy machine that steps an instruction through its
// clock cycles (T-states).
//
// T1 is the opcode-fetch cycle; SYNC is high in it and the cycle count
// (cycle#) and timing class of the new opcode are taken from the
// predecoder. The machine then counts T2, T3, ... The 'last' output (the
// 6502's T0) marks the final cycle and is a Mealy output: it depends on
// the present inputs as well as the state.
//   normal : last when the count reaches cycle#.
//   RMW    : the two cycles before the end are SD1 (write back the
//            unmodified operand) and SD2 (write the modified one).
//   branch : T2_b fetches the offset; if the condition BRC is false the
//            branch ends there. T3_b adds the offset to PCL; if that
//            crossed a page ('page_cross', from ACR and the offset sign)
//            one more cycle fixes PCH.
//   indexed reads (abs,X / abs,Y / (zp),Y) end one cycle early when the
//            index addition gave no carry (ACR = 0).
// The three classes are the document's; the early end of indexed reads
// follows the cycle counts of the original 6502.
module timing_generator
  import cpu_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic [2:0] cycle_num,   // from the predecoder, used in T1
  input  kind_t      kind_in,     // from the predecoder, used in T1
  input  logic       brc,         // branch condition true
  input  logic       acr,         // ALU carry
  input  logic       page_cross,  // branch target in another page
  output tstate_t    ts,
  output logic       sync
);
  logic [2:0] t_q, cyc_q;
  kind_t      kind_q;

  always_comb begin
    ts.t   = t_q;
    sync   = (t_q == 3'd1);
    ts.sd1 = (kind_q == K_RMW) && (t_q == cyc_q - 3'd1);
    ts.sd2 = (kind_q == K_RMW) && (t_q == cyc_q);
    if (t_q == 3'd1) ts.last = 1'b0;
    else unique case (kind_q)
      K_BRANCH:  ts.last = (t_q == 3'd2) ? !brc :
                           (t_q == 3'd3) ? !page_cross : 1'b1;
      K_IDXREAD: ts.last = (t_q == cyc_q) || ((t_q == cyc_q - 3'd1) && !acr);
      default:   ts.last = (t_q == cyc_q);
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      t_q    <= 3'd1;
      cyc_q  <= 3'd2;
      kind_q <= K_NORMAL;
    end else if (ce) begin
      if (sync) begin
        t_q    <= 3'd2;
        cyc_q  <= cycle_num;
        kind_q <= kind_in;
      end else if (ts.last) begin
        t_q <= 3'd1;
      end else begin
        t_q <= t_q + 3'd1;
      end
    end
  end
endmodule
