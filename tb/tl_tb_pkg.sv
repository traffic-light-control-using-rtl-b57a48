// tl_tb_pkg: reference data for the traffic-light testbenches.
//
// Holds, written out by hand from the state tables, the lamps every state
// must show (vehicle heads N W S E as R/Y/G, pedestrian heads N W S E as R/G)
// and each state's delay in delay units. It also decodes the controller's
// lamp vector into the same letters ('-' for a dark head, '?' for a head with
// more than one lamp lit), so that the checks never reuse the design's own
// lamp functions.
package tl_tb_pkg;
  import tl_pkg::*;

  function automatic string exp_car(state_t s);
    case (s)
      S0:  return "GRGR";  S1:  return "YRYR";  S3:  return "RGRG";  S4: return "RYRY";
      S8:  return "GRRR";  S9:  return "YRRR";
      S11: return "RGRR";  S12: return "RYRR";
      S14: return "RRGR";  S15: return "RRYR";
      S17: return "RRRG";  S18: return "RRRY";
      default: return "RRRR";
    endcase
  endfunction

  function automatic string exp_ped(state_t s);
    case (s)
      SNS: return "GRGR";  SEW: return "RGRG";
      SN:  return "GRRR";  SW:  return "RGRR";  SS: return "RRGR";  SE: return "RRRG";
      default: return "RRRR";
    endcase
  endfunction

  function automatic int unsigned exp_units(state_t s);
    case (s)
      S0, S3, S8, S11, S14, S17: return 5;
      SNS, SEW, SN, SW, SS, SE:  return 6;
      default:                   return 1;
    endcase
  endfunction

  function automatic string car_str(lamps_t l);
    string r = "";
    for (int a = 0; a < 4; a++) begin
      case ({l.car[a].red, l.car[a].yellow, l.car[a].green})
        3'b100:  r = {r, "R"};
        3'b010:  r = {r, "Y"};
        3'b001:  r = {r, "G"};
        3'b000:  r = {r, "-"};
        default: r = {r, "?"};
      endcase
    end
    return r;
  endfunction

  function automatic string ped_str(lamps_t l);
    string r = "";
    for (int a = 0; a < 4; a++) begin
      case ({l.ped[a].red, l.ped[a].green})
        2'b10:   r = {r, "R"};
        2'b01:   r = {r, "G"};
        2'b00:   r = {r, "-"};
        default: r = {r, "?"};
      endcase
    end
    return r;
  endfunction

endpackage
