// ax25_pkg: constants and character helpers shared by the AX.25 monitor.
// It holds the AX.25 flag octet, the conversion of address octets to
// printable characters (call sign characters are ASCII shifted one bit left;
// anything outside 0x20..0x7E prints as '?'), the hex digit of a nibble, and
// the frame-type acronym decoded from a one-octet control field following the
// I, S and U frame tables of AX.25. The acronym is returned left-aligned in a
// 5-character array with its length.
package ax25_pkg;

  localparam logic [7:0] FLAG_OCTET = 8'h7E;

  typedef logic [7:0] char_t;
  typedef char_t acr_t [5];

  // Character of one call sign octet; pass bits 7..1, which carry the ASCII code.
  function automatic char_t callsign_char(input logic [6:0] code);
    logic [7:0] c;
    c = {1'b0, code};
    return (c >= 8'h20 && c <= 8'h7E) ? c : 8'h3F;
  endfunction

  function automatic char_t hex_char(input logic [3:0] nib);
    return (nib < 4'd10) ? (8'h30 + {4'd0, nib}) : (8'h37 + {4'd0, nib});
  endfunction

  // Acronym of a control octet; len is the number of valid characters.
  function automatic void control_acronym(input logic [7:0] ctl, output acr_t acr,
                                          output logic [2:0] len);
    acr = '{8'h20, 8'h20, 8'h20, 8'h20, 8'h20};
    len = 3'd1;
    acr[0] = "?";
    if (!ctl[0]) begin
      acr[0] = "I";
    end else if (ctl[1:0] == 2'b01) begin
      unique case (ctl[3:2])
        2'b00: begin acr[0] = "R"; acr[1] = "R"; len = 3'd2; end
        2'b01: begin acr[0] = "R"; acr[1] = "N"; acr[2] = "R"; len = 3'd3; end
        2'b10: begin acr[0] = "R"; acr[1] = "E"; acr[2] = "J"; len = 3'd3; end
        default: begin acr[0] = "S"; acr[1] = "R"; acr[2] = "E"; acr[3] = "J"; len = 3'd4; end
      endcase
    end else begin
      // U frame: bits 7..5 and 3..2 select the command/response
      case ({ctl[7:5], ctl[3:2]})
        5'b011_11: begin acr = '{"S","A","B","M","E"}; len = 3'd5; end
        5'b001_11: begin acr[0] = "S"; acr[1] = "A"; acr[2] = "B"; acr[3] = "M"; len = 3'd4; end
        5'b010_00: begin acr[0] = "D"; acr[1] = "I"; acr[2] = "S"; acr[3] = "C"; len = 3'd4; end
        5'b000_11: begin acr[0] = "D"; acr[1] = "M"; len = 3'd2; end
        5'b011_00: begin acr[0] = "U"; acr[1] = "A"; len = 3'd2; end
        5'b100_01: begin acr[0] = "F"; acr[1] = "R"; acr[2] = "M"; acr[3] = "R"; len = 3'd4; end
        5'b000_00: begin acr[0] = "U"; acr[1] = "I"; len = 3'd2; end
        5'b101_11: begin acr[0] = "X"; acr[1] = "I"; acr[2] = "D"; len = 3'd3; end
        5'b111_00: begin acr[0] = "T"; acr[1] = "E"; acr[2] = "S"; acr[3] = "T"; len = 3'd4; end
        default: ;
      endcase
    end
  endfunction

endpackage
