// Helpers shared by the readout testbenches: character-code decoding and
// decimal digit packing computed with plain arithmetic.
function automatic string char_str(input logic [4:0] c);
  case (c)
    5'd10: return "F";  5'd11: return "E"; 5'd12: return "A"; 5'd13: return "D";
    5'd14: return "H";  5'd15: return "M"; 5'd16: return "K"; 5'd17: return "V";
    5'd18: return ".";  5'd19: return "m"; 5'd20: return ":"; 5'd21: return "z";
    5'd22: return "";   5'd23: return "%";
    default: return (c < 10) ? $sformatf("%0d", c) : "?";
  endcase
endfunction

function automatic logic [27:0] dec_digits(input int unsigned n);
  logic [27:0] d;
  int unsigned p;
  p = 1;
  for (int k = 0; k < 7; k++) begin
    d[4*k +: 4] = 4'((n / p) % 10);
    p *= 10;
  end
  return d;
endfunction
