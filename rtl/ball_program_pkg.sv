// ball_program_pkg: the bouncing-ball demonstration program for the 6502,
// as machine code starting at address 0000h.
//
// The program keeps a ball position in X and Y. It stores sizeX = FFh at
// 0070h, sizeY = DFh at 0071h and the two directions (1 = increasing) at
// 0072h and 0073h, then loops forever: step X one position in its
// direction, reverse the direction at 0 and at sizeX, then do the same for
// Y. Block B1 (0018h) and B2 (0021h) test the directions, B3-B6 step and
// compare, B7-B10 store a new direction, B11/B12 jump back.
// Three opcodes in the published listing read E8h (INX), ECh (CPX abs) and
// E0h (CPX #) here, as the assembly listing beside it gives them, and the
// BNE of block B5 jumps +27h to B11 at 0068h, the target the listing names.
package ball_program_pkg;
  localparam int PROG_LEN = 110;

  function automatic logic [7:0] prog_byte(input int unsigned a);
    logic [7:0] rom [0:PROG_LEN-1];
    rom = '{
      8'hA2, 8'h00, 8'hA0, 8'h00, 8'hA9, 8'hFF, 8'h8D, 8'h70, 8'h00,   // LDX #0, LDY #0, sizeX
      8'hA9, 8'hDF, 8'h8D, 8'h71, 8'h00,                               // sizeY
      8'hA9, 8'h01, 8'h8D, 8'h72, 8'h00, 8'hA9, 8'h01, 8'h8D, 8'h73, 8'h00, // dirX, dirY
      8'hAD, 8'h72, 8'h00, 8'hC9, 8'h01, 8'hF0, 8'h0B, 8'hD0, 8'h11,   // B1 0018
      8'hAD, 8'h73, 8'h00, 8'hC9, 8'h01, 8'hF0, 8'h11, 8'hD0, 8'h17,   // B2 0021
      8'hE8, 8'hEC, 8'h70, 8'h00, 8'hF0, 8'h18, 8'hD0, 8'h39,          // B3 002A
      8'hCA, 8'hE0, 8'h00, 8'hF0, 8'h19, 8'hD0, 8'h32,                 // B4 0032
      8'hC8, 8'hCC, 8'h71, 8'h00, 8'hF0, 8'h19, 8'hD0, 8'h27,          // B5 0039
      8'h88, 8'hC0, 8'h00, 8'hF0, 8'h1A, 8'hD0, 8'h20,                 // B6 0041
      8'hA9, 8'h00, 8'h8D, 8'h72, 8'h00, 8'h4C, 8'h21, 8'h00,          // B7 0048
      8'hA9, 8'h01, 8'h8D, 8'h72, 8'h00, 8'h4C, 8'h21, 8'h00,          // B8 0050
      8'hA9, 8'h00, 8'h8D, 8'h73, 8'h00, 8'h4C, 8'h18, 8'h00,          // B9 0058
      8'hA9, 8'h01, 8'h8D, 8'h73, 8'h00, 8'h4C, 8'h18, 8'h00,          // B10 0060
      8'h4C, 8'h18, 8'h00,                                             // B11 0068
      8'h4C, 8'h21, 8'h00                                              // B12 006B
    };
    return (a < PROG_LEN) ? rom[a] : 8'h00;
  endfunction
endpackage
