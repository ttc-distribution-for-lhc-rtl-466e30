// Reference models shared by the TTC testbenches (included inside a module):
// SEC-DED check bits built codeword position by position, and the bit
// patterns of short and long B channel frames, most significant bit sent first.

function automatic logic [6:0] ref_chk(logic [31:0] d, int dw, int r);
  logic [6:0] c = '0;
  int pos = 1, di = 0;
  while (di < dw) begin
    if ((pos & (pos - 1)) != 0) begin
      for (int k = 0; k < r; k++) if ((pos >> k) & 1) c[k] ^= d[di];
      di++;
    end
    pos++;
  end
  for (int i = 0; i < dw; i++) c[r] ^= d[i];
  for (int k = 0; k < r; k++) c[r] ^= c[k];
  return c;
endfunction

function automatic logic [15:0] ref_short(logic [7:0] cmd);
  logic [6:0] c = ref_chk({24'd0, cmd}, 8, 4);
  return {1'b0, 1'b0, cmd, c[4:0], 1'b1};
endfunction

function automatic logic [41:0] ref_long(logic [13:0] addr, logic e, logic [7:0] sub, logic [7:0] data);
  logic [6:0] c = ref_chk({addr, e, 1'b1, sub, data}, 32, 6);
  return {1'b0, 1'b1, addr, e, 1'b1, sub, data, c, 1'b1};
endfunction
