// tb_ico_se: self-checking test of the b x 2b switching element (B=4, 256-line
// tags). Directed cases check local extraction, straight routing with tag
// rotation, priority of the shorter distance and the deflected tag. A random
// phase checks, for every cycle, that every cell leaves by exactly one path,
// that remote tags keep the destination, that local exits only take
// distance-0 cells to their row, and that a deflected cell lost its outlet to a
// cell of equal or shorter distance.
module tb_ico_se;
  localparam int B = 4, TW = 8, PW = 16, DW = 2, ND = 4;
  logic [B-1:0] in_v, rem_ok, loc_ok, rem_v, loc_v, defl, drop;
  logic [B-1:0][TW-1:0] in_tag, rem_tag;
  logic [B-1:0][PW-1:0] in_pay, rem_pay, loc_pay;
  logic [1:0] rnd;
  int checks = 0, failures = 0;

  ico_se #(.B(B), .TW(TW), .PW(PW)) dut (.*);

  task automatic chk(input logic c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", m); end
  endtask

  function automatic int distance(logic [TW-1:0] t);
    int d = 0;
    for (int k = 0; k < ND; k++) if (t[TW-1-k*DW -: DW] != 0) d = k;
    return d;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rem_ok = '1; loc_ok = '1; rnd = 0;
    // 1. distance-0 cell: inlet 1, tag 10_00_00_00 -> local outlet 3
    in_v = 4'b0010; in_tag = '0; in_pay = '0;
    in_tag[1] = 8'b10_00_00_00; in_pay[1] = 16'hBEEF;
    #1;
    chk(loc_v == 4'b1000 && loc_pay[3] == 16'hBEEF && rem_v == 0, "local exit");
    // 2. local outlet busy: the cell goes straight on with an all-zero tag
    loc_ok = 4'b0111; #1;
    chk(loc_v == 0 && rem_v == 4'b1000 && rem_tag[3] == 0 && defl == 0, "local busy -> remote");
    loc_ok = '1;
    // 3. straight routing with rotation: inlet 0, tag 01_00_00_11 -> outlet 1
    in_v = 4'b0001; in_tag[0] = 8'b01_00_00_11; in_pay[0] = 16'h0001; #1;
    chk(rem_v == 4'b0010 && rem_tag[1] == 8'b00_00_11_00 && loc_v == 0, "straight + rotate");
    // 4. conflict: inlet 0 (distance 1, wants 1) beats inlet 2 (distance 3, wants 1)
    in_v = 4'b0101;
    in_tag[0] = 8'b01_01_00_00; in_pay[0] = 16'h00A0;
    in_tag[2] = 8'b11_00_00_01; in_pay[2] = 16'h00A2; #1;
    chk(rem_v[1] && rem_pay[1] == 16'h00A0 && rem_tag[1] == 8'b01_00_00_00, "shorter distance wins");
    chk(rem_v[0] && rem_pay[0] == 16'h00A2 && rem_tag[0] == 8'b00_00_01_01, "deflected tag");
    chk(defl == 4'b0100 && drop == 0, "deflect flag");
    // 5. only outlet 1 usable: the loser is dropped
    rem_ok = 4'b0010; #1;
    chk(drop == 4'b0100 && rem_v == 4'b0010, "drop with no usable outlet");
    rem_ok = '1;

    // random phase
    for (int n = 0; n < 4000; n++) begin

      in_v = 4'($urandom); rem_ok = 4'($urandom) | 4'b0001; loc_ok = 4'($urandom);
      rnd = 2'($urandom);
      for (int i = 0; i < B; i++) begin
        in_tag[i] = 8'($urandom);
        if ($urandom % 3 == 0) in_tag[i][5:0] = 0;   // more distance-0 cells
        in_pay[i] = 16'(i);
      end
      #1;
      for (int i = 0; i < B; i++) begin
        automatic int paths = 0;
        automatic int want = i ^ in_tag[i][7:6];
        for (int j = 0; j < B; j++) begin
          if (loc_v[j] && loc_pay[j] == 16'(i)) begin
            paths++;
            chk(distance(in_tag[i]) == 0 && j == want && loc_ok[j], "local exit rule");
          end
          if (rem_v[j] && rem_pay[j] == 16'(i)) begin
            automatic logic [DW-1:0] nd = DW'(j) ^ DW'(want);
            paths++;
            chk(rem_ok[j], "remote outlet usable");
            chk(rem_tag[j] == {in_tag[i][5:0], nd}, "remote tag keeps destination");
            if (j != want) begin
              // the wanted outlet went to a cell no further from home
              chk(defl[i], "deflect flag set");
              if (rem_ok[want]) begin
                automatic int w = rem_pay[want];
                chk(rem_v[want] && distance(in_tag[w]) <= distance(in_tag[i]), "priority by distance");
              end
            end
          end
        end
        if (in_v[i]) chk(paths + int'(drop[i]) == 1, "one path per cell");
        else         chk(paths == 0 && !drop[i], "no phantom cell");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
