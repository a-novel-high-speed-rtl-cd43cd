// Radix-4 recoding of the whole 54-bit unsigned multiplier.
//
// Produces the 28 neg/two/one digits of y. The multiplier is unsigned, so it
// is extended with zeros to 56 bits (y[55] = y[54] = 0) and y[-1] = 0; the
// top digit therefore only ever takes the values +0 or +X.
// RECODE = RECODE_PARALLEL uses one parallel recoder per digit (the scheme
// recommended for tree multipliers); RECODE_SERIAL chains serial recoders
// through their carries, digit 0 with carry-in 0. The recoders and the
// padded top digit follow the published design; making the scheme a
// parameter is this design's choice. Combinational.
module booth_encoder
  import mult_pkg::*;
#(
  parameter recode_e RECODE = RECODE_PARALLEL
) (
  input  logic   [N_BITS-1:0]   y,
  output booth_t [N_DIGITS-1:0] dig
);

  logic [2*N_DIGITS:0] ye;   // ye[k+1] = y[k]; ye[0] = y[-1] = 0
  assign ye = {{(2*N_DIGITS - N_BITS){1'b0}}, y, 1'b0};

  if (RECODE == RECODE_PARALLEL) begin : g_par
    for (genvar i = 0; i < N_DIGITS; i++) begin : g_dig
      booth_recoder_par u_rec (
        .y_hi (ye[2*i+2]),
        .y_mid(ye[2*i+1]),
        .y_lo (ye[2*i]),
        .dig  (dig[i])
      );
    end
  end else begin : g_ser
    logic [N_DIGITS:0] c;
    assign c[0] = 1'b0;
    for (genvar i = 0; i < N_DIGITS; i++) begin : g_dig
      booth_recoder_ser u_rec (
        .y_hi (ye[2*i+2]),
        .y_mid(ye[2*i+1]),
        .c_in (c[i]),
        .dig  (dig[i]),
        .c_out(c[i+1])
      );
    end
  end

endmodule
