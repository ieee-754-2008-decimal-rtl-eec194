// bcd_adder: 19-digit BCD adder/subtractor with nine's-complement
// subtraction and carry-select ("carry look-ahead") groups. Combinational.
// Operands: na2 (16 digits, extended by three zero digits on the right) and
// nb2 (16 digits, guard, round, and the sticky bit extended to a digit).
// In an effective subtraction nb2 is nine's-complemented digit by digit.
// The digits are split into groups of GROUP digits (the top group may be
// shorter); every group computes its sum for carry-in 0 and carry-in 1 in
// parallel (bcd_group), and only a chain of 2:1 carry multiplexers runs
// across the groups. The chain is evaluated with carry-in 0 to obtain the
// most significant carry; carry_effect turns it into the end-around carry
// and the complement request, and a second pass of the mux chain with the
// end-around carry selects the group sums. If complement_out is set the
// result is negative and the selected sum is nine's-complemented.
// Outputs: inter_result (19-digit magnitude), carry_out (decimal carry of an
// effective addition), complement_out (result sign must be inverted).
// Width, nine's-complement subtraction and 4-digit carry-select groups
// follow the original design; evaluating the group carry chain twice to
// avoid a combinational end-around-carry loop is this design's choice.
module bcd_adder #(
  parameter int unsigned NDIG  = 19,
  parameter int unsigned GROUP = 4
) (
  input  logic [63:0]       na2,
  input  logic [72:0]       nb2,
  input  logic              eff_sub,
  output logic [4*NDIG-1:0] inter_result,
  output logic              carry_out,
  output logic              complement_out
);
  localparam int unsigned NGRP = (NDIG + GROUP - 1) / GROUP;
  localparam int unsigned PADW = 4 * NGRP * GROUP;

  logic [PADW-1:0] a_pad, b_pad, s0, s1;
  logic [NGRP-1:0] gc0, gc1;
  logic [NGRP:0]   chain0, chainf;
  logic [PADW-1:0] sum_sel;
  logic [4*NDIG-1:0] sum, sum_nc;
  logic            cin;

  // {na2, 000} and {nb2 digits, sticky digit}, zero-padded above digit NDIG-1
  assign a_pad = PADW'({na2, 12'h000});
  assign b_pad = PADW'({nb2[72:1], 3'b000, nb2[0]});

  for (genvar g = 0; g < NGRP; g++) begin : g_grp
    logic [4*GROUP-1:0] b_g;
    // padding digits above NDIG must stay 0 after complementing
    if ((g + 1) * GROUP > NDIG) begin : g_top
      for (genvar d = 0; d < GROUP; d++) begin : g_d
        if (g * GROUP + d < NDIG) begin : g_real
          assign b_g[4*d +: 4] = b_pad[4*(g*GROUP+d) +: 4];
        end else begin : g_pad
          // 9 here, complemented to 0 inside the cell when subtracting
          assign b_g[4*d +: 4] = eff_sub ? 4'd9 : 4'd0;
        end
      end
    end else begin : g_full
      assign b_g = b_pad[4*GROUP*g +: 4*GROUP];
    end
    bcd_group #(.GROUP(GROUP)) u_grp (
      .a(a_pad[4*GROUP*g +: 4*GROUP]), .b(b_g), .operation(eff_sub),
      .sum0(s0[4*GROUP*g +: 4*GROUP]), .sum1(s1[4*GROUP*g +: 4*GROUP]),
      .cout0(gc0[g]), .cout1(gc1[g]));
  end

  // Group carry chain, first pass with carry-in 0.
  assign chain0[0] = 1'b0;
  for (genvar g = 0; g < NGRP; g++) begin : g_ch0
    assign chain0[g+1] = chain0[g] ? gc1[g] : gc0[g];
  end

  // Carry out of digit NDIG-1 (inside the top group when it is padded).
  logic msd_carry0;
  if (NGRP * GROUP == NDIG) begin : g_exact
    assign msd_carry0 = chain0[NGRP];
  end else begin : g_padded
    // the padding digits hold 0 + 0 (or 0 + 9c(9) = 0), so a carry out of
    // the real digits appears as digit NDIG of the sum
    logic [PADW-1:0] s_first;
    for (genvar g = 0; g < NGRP; g++) begin : g_s
      assign s_first[4*GROUP*g +: 4*GROUP] = chain0[g] ? s1[4*GROUP*g +: 4*GROUP]
                                                       : s0[4*GROUP*g +: 4*GROUP];
    end
    assign msd_carry0 = s_first[4*NDIG];
  end

  carry_effect u_ce (.eff_sub(eff_sub), .carry_out(msd_carry0), .cin(cin),
                     .complement_out(complement_out));

  // Second pass with the end-around carry.
  assign chainf[0] = cin;
  for (genvar g = 0; g < NGRP; g++) begin : g_chf
    assign chainf[g+1] = chainf[g] ? gc1[g] : gc0[g];
    assign sum_sel[4*GROUP*g +: 4*GROUP] = chainf[g] ? s1[4*GROUP*g +: 4*GROUP]
                                                     : s0[4*GROUP*g +: 4*GROUP];
  end

  assign sum = sum_sel[4*NDIG-1:0];
  for (genvar d = 0; d < NDIG; d++) begin : g_out
    nines_comp u_nc (.d(sum[4*d +: 4]), .q(sum_nc[4*d +: 4]));
  end

  assign inter_result = complement_out ? sum_nc : sum;
  assign carry_out    = ~eff_sub & msd_carry0;
endmodule
